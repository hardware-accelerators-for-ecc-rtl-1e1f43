// tb_fu_inv: self-checking test of the Fp inversion unit.
//
// Random x below a 256-bit prime (8 words) and below 2^127 - 1 (4 words),
// plus x = 1 and x = p - 1: the result r must satisfy r < p and
// x * r = 1 (mod p), checked with wide integers. x = 0 must give 0. The busy
// time must not exceed 4 * 256 + 2 cycles.
module tb_fu_inv;
  localparam int W = 32, NW = 8, IW = $clog2(NW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en, start, ld_bypass;
  logic [IW-1:0] ld_idx, rd_idx;
  logic [W-1:0] ld_x, ld_y;
  logic [NW-1:0][W-1:0] modulus;
  logic busy;
  logic [W-1:0] rd_word;

  fu_inv #(.W(W), .NW(NW)) dut (.clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .start, .modulus, .busy, .rd_idx, .rd_word);

  int checks = 0, failures = 0, maxc = 0;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(logic [255:0] p, int nw, logic [255:0] a);
    logic [255:0] r;
    logic [511:0] e;
    int c;
    modulus = p;
    for (int k = 0; k < nw; k++) begin
      @(negedge clk);
      ld_en = 1; ld_idx = IW'(k); ld_x = a[k*32 +: 32]; ld_y = $urandom;
    end
    @(negedge clk); ld_en = 0; start = 1;
    @(negedge clk); start = 0;
    c = 0;
    while (busy && c < 2000) begin c++; @(negedge clk); end
    if (c > maxc) maxc = c;
    r = '0;
    for (int k = 0; k < NW; k++) begin
      rd_idx = IW'(k); #1; r[k*32 +: 32] = rd_word;
    end
    e = (512'(a) * 512'(r)) % 512'(p);
    checks += 2;
    if (a == 0) begin
      if (r != 0) begin failures++; $display("FAIL inverse of 0 gave %h", r); end
    end else if (e != 1 || r >= p) begin
      failures++; $display("FAIL x=%h r=%h", a, r);
    end
    if (c > 4 * 256 + 2) begin failures++; $display("FAIL took %0d cycles", c); end
  endtask

  initial begin
    logic [255:0] p256, p127;
    p256 = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;
    p127 = (256'd1 << 127) - 1;
    ld_en = 0; start = 0; ld_bypass = 0; ld_idx = 0; ld_x = 0; ld_y = 0; rd_idx = 0;
    modulus = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(p256, 8, 1);
    check(p256, 8, p256 - 1);
    check(p256, 8, 0);
    for (int t = 0; t < 25; t++) begin
      check(p256, 8, rnd256() % p256);
      check(p127, 4, rnd256() % p127);
    end
    $display("longest inversion: %0d cycles", maxc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
