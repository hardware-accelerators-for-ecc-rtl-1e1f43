// tb_fu_mont_mul: self-checking test of the Montgomery multiplier.
//
// Three instances (NB = 1, the default, NB = 2 and NB = 4) receive the same
// random operands below a 256-bit prime (8 words), a 192-bit prime (6 words,
// not a multiple of 4) and 2^127 - 1 (4 words, the HECC field size). Each result r must satisfy r < p and
// r * 2^(32*nw) = x * y (mod p), checked with wide integer arithmetic in the
// testbench, and the busy time must equal the documented cycle count.
module tb_fu_mont_mul;
  localparam int W = 32, NW = 8, IW = $clog2(NW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en, start, ld_bypass;
  logic [IW-1:0] ld_idx, rd_idx;
  logic [W-1:0] ld_x, ld_y, pinv;
  logic [NW-1:0][W-1:0] modulus;
  logic busy1, busy2, busy4;
  logic [W-1:0] rd1, rd2, rd4;

  fu_mont_mul #(.W(W), .NW(NW)) dut1 (.clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .start, .modulus, .pinv, .busy(busy1), .rd_idx, .rd_word(rd1));
  fu_mont_mul #(.W(W), .NW(NW), .NB(2)) dut2 (.clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .start, .modulus, .pinv, .busy(busy2), .rd_idx, .rd_word(rd2));
  fu_mont_mul #(.W(W), .NW(NW), .NB(4)) dut4 (.clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .start, .modulus, .pinv, .busy(busy4), .rd_idx, .rd_word(rd4));

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] neg_inv(logic [W-1:0] p0);
    logic [W-1:0] x = 1;
    for (int k = 0; k < 6; k++) x = x * (2 - p0 * x);
    return -x;
  endfunction

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic run(logic [255:0] p, int nw, logic [255:0] a, logic [255:0] b);
    logic [767:0] ab, rr, r1, r2, r4, rmod;
    int cyc, exp1, exp2, exp4, c1, c2, c4;
    modulus = p;
    pinv = neg_inv(p[31:0]);
    for (int k = 0; k < nw; k++) begin
      @(negedge clk);
      ld_en = 1; ld_idx = IW'(k); ld_x = a[k*32 +: 32]; ld_y = b[k*32 +: 32];
    end
    @(negedge clk); ld_en = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 0; c1 = 0; c2 = 0; c4 = 0;
    while (busy1 || busy2 || busy4) begin
      if (busy1) c1++;
      if (busy2) c2++;
      if (busy4) c4++;
      @(negedge clk);
      cyc++;
      if (cyc > 2000) break;
    end
    r1 = '0; r2 = '0; r4 = '0;
    for (int k = 0; k < nw; k++) begin
      rd_idx = IW'(k); #1;
      r1[k*32 +: 32] = rd1; r2[k*32 +: 32] = rd2; r4[k*32 +: 32] = rd4;
    end
    ab = (768'(a) * 768'(b)) % 768'(p);
    rmod = 768'(1) << (32 * nw);
    exp1 = nw * (2 * ((nw + 0) / 1) + 3) + nw + 1;
    exp2 = nw * (2 * ((nw + 1) / 2) + 3) + nw + 1;
    exp4 = nw * (2 * ((nw + 3) / 4) + 3) + nw + 1;
    checks += 9;
    if (r4 >= 768'(p)) begin failures++; $display("FAIL NB=4 r >= p"); end
    rr = (r4 * rmod) % 768'(p);
    if (rr != ab) begin failures++; $display("FAIL NB=4 product mismatch %h", r4); end
    if (c4 != exp4) begin failures++; $display("FAIL NB=4 cycles %0d expected %0d", c4, exp4); end
    if (r1 >= 768'(p)) begin failures++; $display("FAIL NB=1 r >= p"); end
    if (r2 >= 768'(p)) begin failures++; $display("FAIL NB=2 r >= p"); end
    rr = (r1 * rmod) % 768'(p);
    if (rr != ab) begin failures++; $display("FAIL NB=1 product mismatch %h", r1); end
    rr = (r2 * rmod) % 768'(p);
    if (rr != ab) begin failures++; $display("FAIL NB=2 product mismatch %h", r2); end
    if (c1 != exp1) begin failures++; $display("FAIL NB=1 cycles %0d expected %0d", c1, exp1); end
    if (c2 != exp2) begin failures++; $display("FAIL NB=2 cycles %0d expected %0d", c2, exp2); end
  endtask

  initial begin
    logic [255:0] p256, p192, p127, a, b;
    p256 = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;
    p192 = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEFFFFFFFFFFFFFFFF;
    p127 = (256'd1 << 127) - 1;
    ld_en = 0; start = 0; ld_bypass = 0; ld_idx = 0; ld_x = 0; ld_y = 0; rd_idx = 0;
    modulus = '0; pinv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      a = rnd256() % p256; b = rnd256() % p256;
      if (t == 0) begin a = p256 - 1; b = p256 - 1; end
      run(p256, 8, a, b);
    end
    for (int t = 0; t < 8; t++) begin
      a = rnd256() % p192; b = rnd256() % p192;
      run(p192, 6, a, b);
    end
    for (int t = 0; t < 8; t++) begin
      a = rnd256() % p127; b = rnd256() % p127;
      run(p127, 4, a, b);
    end
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
