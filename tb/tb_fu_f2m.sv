// tb_fu_f2m: self-checking test of the binary-field unit.
//
// Uses the pentanomial field F(2^163), f = t^163 + t^7 + t^6 + t^3 + 1
// (6 words), and the trinomial field F(2^233), f = t^233 + t^74 + 1
// (8 words). Random elements are added, multiplied and inverted; the expected
// product is formed here as a full carry-less product followed by reduction
// from the top coefficient down, and an inverse must give 1 when multiplied
// by its input that way (0 must give 0). Multiplication must take m cycles,
// addition none, inversion at most 4m.
module tb_fu_f2m;
  localparam int W = 32, NW = 8, IW = $clog2(NW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en, start, ld_bypass;
  logic [1:0] mode;
  logic [IW-1:0] ld_idx, rd_idx;
  logic [W-1:0] ld_x, ld_y;
  logic [NW-1:0][W-1:0] modulus;
  logic busy;
  logic [W-1:0] rd_word;

  fu_f2m #(.W(W), .NW(NW)) dut (.clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .start, .mode, .modulus, .busy, .rd_idx, .rd_word);

  int checks = 0, failures = 0;

  function automatic logic [255:0] ref_mul(logic [255:0] a, logic [255:0] b, logic [255:0] f, int m);
    logic [511:0] p = '0;
    for (int i = 0; i < 256; i++) if (b[i]) p ^= (512'(a) << i);
    for (int i = 511; i >= m; i--) if (p[i]) p ^= (512'(f) << (i - m));
    return p[255:0];
  endfunction

  int max_inv = 0;

  // op: 0 add, 1 multiply, 2 invert
  task automatic check(logic [255:0] f, int m, logic [255:0] a, logic [255:0] b, int op);
    logic [255:0] r, e;
    int c, nw;
    nw = (m + 31) / 32;
    modulus = f;
    for (int k = 0; k < nw; k++) begin
      @(negedge clk);
      ld_en = 1; ld_idx = IW'(k); ld_x = a[k*32 +: 32]; ld_y = b[k*32 +: 32];
    end
    @(negedge clk); ld_en = 0; start = 1; mode = 2'(op);
    @(negedge clk); start = 0;
    c = 0;
    while (busy && c < 1000) begin c++; @(negedge clk); end
    r = '0;
    for (int k = 0; k < NW; k++) begin rd_idx = IW'(k); #1; r[k*32 +: 32] = rd_word; end
    checks += 2;
    if (op == 2) begin
      if (c > max_inv) max_inv = c;
      if (a == 0 ? (r != 0) : (ref_mul(a, r, f, m) != 1)) begin
        failures++; $display("FAIL m=%0d inverse of %h gave %h", m, a, r);
      end
      if (c > 4 * m) begin failures++; $display("FAIL inversion took %0d cycles", c); end
    end else begin
      e = (op == 1) ? ref_mul(a, b, f, m) : (a ^ b);
      if (r != e) begin failures++; $display("FAIL m=%0d op=%0d r=%h exp=%h", m, op, r, e); end
      if (c != ((op == 1) ? m : 0)) begin failures++; $display("FAIL %0d busy cycles", c); end
    end
  endtask

  function automatic logic [255:0] rnd(int m);
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v & ((256'd1 << m) - 1);
  endfunction

  initial begin
    logic [255:0] f163, f233;
    f163 = (256'd1 << 163) | (256'd1 << 7) | (256'd1 << 6) | (256'd1 << 3) | 256'd1;
    f233 = (256'd1 << 233) | (256'd1 << 74) | 256'd1;
    ld_en = 0; start = 0; ld_bypass = 0; ld_idx = 0; ld_x = 0; ld_y = 0; rd_idx = 0; mode = 0;
    modulus = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(f233, 233, (256'd1 << 232), (256'd1 << 232), 1);
    check(f163, 163, 1, rnd(163), 1);
    for (int t = 0; t < 15; t++) begin
      check(f163, 163, rnd(163), rnd(163), 1);
      check(f233, 233, rnd(233), rnd(233), 1);
      check(f233, 233, rnd(233), rnd(233), 0);
      check(f163, 163, rnd(163), 0, 2);
      check(f233, 233, rnd(233), 0, 2);
    end
    check(f233, 233, 0, 0, 2);
    check(f233, 233, 1, 0, 2);
    check(f233, 233, (256'd1 << 232), 0, 2);
    $display("longest inversion: %0d cycles", max_inv);
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
