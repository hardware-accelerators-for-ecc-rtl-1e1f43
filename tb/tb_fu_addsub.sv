// tb_fu_addsub: self-checking test of the word-serial Fp adder/subtracter.
//
// Random operands below a 256-bit prime (8 words) and below 2^127 - 1
// (4 words), plus edge cases (0, p - 1), are added and subtracted; results
// are compared with (x + y) mod p and (x - y) mod p computed with wide
// integers. The busy time must be nw cycles. One case loads its first
// operand through the output-to-input bypass.
module tb_fu_addsub;
  localparam int W = 32, NW = 8, IW = $clog2(NW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en, start, ld_bypass, sub;
  logic [IW-1:0] ld_idx, rd_idx;
  logic [W-1:0] ld_x, ld_y;
  logic [NW-1:0][W-1:0] modulus;
  logic busy;
  logic [W-1:0] rd_word;

  fu_addsub #(.W(W), .NW(NW)) dut (.clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .start, .sub, .modulus, .busy, .rd_idx, .rd_word);

  int checks = 0, failures = 0;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic op(logic [255:0] p, int nw, logic [255:0] a, logic [255:0] b, bit s, bit byp,
                    output logic [255:0] r);
    int c;
    modulus = p;
    for (int k = 0; k < nw; k++) begin
      @(negedge clk);
      ld_en = 1; ld_idx = IW'(k); ld_x = a[k*32 +: 32]; ld_y = b[k*32 +: 32]; ld_bypass = byp;
    end
    @(negedge clk); ld_en = 0; ld_bypass = 0; start = 1; sub = s;
    @(negedge clk); start = 0;
    c = 0;
    while (busy && c < 100) begin c++; @(negedge clk); end
    r = '0;
    for (int k = 0; k < nw; k++) begin
      rd_idx = IW'(k); #1; r[k*32 +: 32] = rd_word;
    end
    checks++;
    if (c != nw) begin failures++; $display("FAIL busy %0d cycles, expected %0d", c, nw); end
  endtask

  task automatic check(logic [255:0] p, int nw, logic [255:0] a, logic [255:0] b, bit s);
    logic [255:0] r;
    logic [257:0] e;
    op(p, nw, a, b, s, 1'b0, r);
    e = s ? ((258'(a) + 258'(p) - 258'(b)) % 258'(p)) : ((258'(a) + 258'(b)) % 258'(p));
    checks++;
    if (258'(r) != e) begin
      failures++; $display("FAIL %s a=%h b=%h r=%h exp=%h", s ? "sub" : "add", a, b, r, e);
    end
  endtask

  initial begin
    logic [255:0] p256, p127, a, b, r;
    logic [257:0] e;
    p256 = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;
    p127 = (256'd1 << 127) - 1;
    ld_en = 0; start = 0; ld_bypass = 0; ld_idx = 0; ld_x = 0; ld_y = 0; rd_idx = 0; sub = 0;
    modulus = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(p256, 8, p256 - 1, p256 - 1, 0);
    check(p256, 8, 0, p256 - 1, 1);
    check(p256, 8, 5, 5, 1);
    check(p256, 8, 0, 0, 0);
    for (int t = 0; t < 40; t++) begin
      a = rnd256() % p256; b = rnd256() % p256;
      check(p256, 8, a, b, t[0]);
      a = rnd256() % p127; b = rnd256() % p127;
      check(p127, 4, a, b, t[1]);
    end
    // bypass: previous result (a + b) becomes the first operand of (r - b)
    a = rnd256() % p256; b = rnd256() % p256;
    op(p256, 8, a, b, 0, 0, r);
    op(p256, 8, 256'hDEAD, b, 1, 1, r);
    checks++;
    if (r != a) begin failures++; $display("FAIL bypass r=%h exp=%h", r, a); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
