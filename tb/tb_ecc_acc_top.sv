// tb_ecc_acc_top: end-to-end test of the accelerator through its host bus.
//
// The accelerator is built with two Montgomery multipliers of two sub-blocks
// each, the optional F2m unit, and a 256-bit prime field (p = 2^256 - 2^224 + 2^192 + 2^96 - 1).
// Everything goes through the host bus: modulus, pinv, key, operands, code.
//
// Program A evaluates r = ((a x b) + c) + (d x e) with the two multipliers
// working in parallel (the schedule of the accelerator's worked example),
// then (r - c) through the output-to-input bypass of the adder, then r^-1 with
// the inverter. Expected values come from wide-integer arithmetic here:
// x "times" y is the Montgomery product x*y*2^-256 mod p.
//
// Program B computes Q = [k]P in the additive group of Fp with a right-to-left
// loop driven by the key unit's digits: CMPD / BNZ pick Q + P or Q - P
// (subtraction mode) through CALL/RET, P doubles every step, SET KNEXT moves
// to the next digit and TST KDONE / BNZ leave the loop. It runs with binary
// digits (lambda = 1) and with the NAF (lambda = 2); the result must be
// k * P mod p.
//
// Program C (built with the optional binary-field unit) multiplies, adds and
// inverts elements of F(2^233), f = t^233 + t^74 + 1, against a carry-less
// reference product (the inverse must multiply back to 1).
//
// Counted mechanisms (each must occur): units busy in parallel, WAIT stalls,
// bypass loads, subtraction launches, inversions, CALL, RET, taken branches,
// key-digit steps, negative NAF digits.
module tb_ecc_acc_top;
  import ecc_pkg::*;
  localparam int W = 32;
  localparam int N_MUL = 2;
  localparam bit HAS_F2M = 1'b1;
  localparam logic [255:0] P256 = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] h_addr;
  logic h_we, h_re, h_rvalid, busy, done;
  logic [W-1:0] h_wdata, h_rdata;

  ecc_acc_top #(.N_MUL(N_MUL), .NB(2), .HAS_F2M(HAS_F2M)) dut (.clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata,
    .h_rdata, .h_rvalid, .busy, .done);

  int checks = 0, failures = 0;
  int n_par = 0, n_stall = 0, n_byp = 0, n_sub = 0, n_inv = 0, n_call = 0, n_ret = 0;
  int n_br = 0, n_knext = 0, n_neg = 0, n_f2m = 0;

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.fu_busy) >= 2) n_par++;
    if (int'(dut.u_ctrl.st) == 2) begin
      if (dut.u_ctrl.ir.op == OP_WAIT && dut.u_ctrl.fu_sel_busy) n_stall++;
      if (dut.u_ctrl.ir.op == OP_CALL) n_call++;
      if (dut.u_ctrl.ir.op == OP_RET) n_ret++;
      if ((dut.u_ctrl.ir.op == OP_BZ && dut.u_ctrl.zf) || (dut.u_ctrl.ir.op == OP_BNZ && !dut.u_ctrl.zf)) n_br++;
    end
    if (dut.fu_ld_bypass && |dut.fu_ld_en) n_byp++;
    if (dut.fu_start[0] && (dut.opmode || dut.launch_mode[0])) n_sub++;
    if (dut.fu_start[1]) n_inv++;
    if (HAS_F2M && dut.fu_start[2 + N_MUL]) n_f2m++;
    if (dut.k_next) begin
      n_knext++;
      if (dut.k_digit < 0) n_neg++;
    end
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hw(logic [3:0] region, int off, logic [W-1:0] d);
    @(negedge clk); h_addr = {region, 12'(off)}; h_we = 1; h_re = 0; h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  task automatic hr(logic [3:0] region, int off, output logic [W-1:0] d);
    @(negedge clk); h_addr = {region, 12'(off)}; h_re = 1; h_we = 0;
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  task automatic put_elem(int base, logic [255:0] v);
    for (int i = 0; i < 8; i++) hw(HREG_RF, base + i, v[i*32 +: 32]);
  endtask

  task automatic get_elem(int base, output logic [255:0] v);
    logic [W-1:0] d;
    for (int i = 0; i < 8; i++) begin hr(HREG_RF, base + i, d); v[i*32 +: 32] = d; end
  endtask

  task automatic run_prog(logic [31:0] prog [$], int limit);
    int c;
    for (int i = 0; i < prog.size(); i++) hw(HREG_CODE, i, prog[i]);
    hw(HREG_CTRL, 0, 1);
    c = 0;
    while (!done && c < limit) begin @(negedge clk); c++; end
    chk(done, "program reached HALT");
  endtask

  function automatic logic [255:0] mulmod(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) * 512'(b)) % 512'(P256));
  endfunction

  function automatic logic [255:0] powmod(logic [255:0] a, logic [255:0] e);
    logic [255:0] r = 1;
    for (int i = 255; i >= 0; i--) begin
      r = mulmod(r, r);
      if (e[i]) r = mulmod(r, a);
    end
    return r;
  endfunction

  function automatic logic [31:0] neg_inv(logic [31:0] p0);
    logic [31:0] x = 1;
    for (int k = 0; k < 6; k++) x = x * (2 - p0 * x);
    return -x;
  endfunction

  // product in F(2^233) = F2[t]/(f): carry-less product, reduced from the top
  function automatic logic [255:0] f2m_mul(logic [255:0] a, logic [255:0] b, logic [255:0] f);
    logic [511:0] pp = '0;
    for (int i = 0; i < 256; i++) if (b[i]) pp ^= (512'(a) << i);
    for (int i = 511; i >= 233; i--) if (pp[i]) pp ^= (512'(f) << (i - 233));
    return pp[255:0];
  endfunction

  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v % P256;
  endfunction

  // address-table set-up: entry r at offset 8*r, 8 words
  function automatic void setup_iat(ref logic [31:0] prog [$], input int nreg);
    for (int r = 0; r < nreg; r++) begin
      prog.push_back(mk(OP_SETADDR0, 0, 4'(r), 0, 0, 14'(8 * r)));
      prog.push_back(mk(OP_SETADDRN, 0, 4'(r), 0, 0, 14'd8));
    end
  endfunction

  localparam logic [3:0] ADD = FU_ADDSUB, INV = FU_INV, MUL0 = FU_MUL0;
  localparam logic [3:0] MUL1 = (N_MUL > 1) ? FU_MUL0 + 1 : FU_MUL0;

  initial begin
    logic [255:0] a, b, c, d, e, r, r7, r9, rinv, exp_r, pt, k, q;
    logic [31:0] prog [$];
    int base;
    h_addr = 0; h_we = 0; h_re = 0; h_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) hw(HREG_MOD, i, P256[i*32 +: 32]);
    hw(HREG_PINV, 0, neg_inv(P256[31:0]));
    rinv = powmod(powmod(2, 256), P256 - 2);

    // ---------------- program A ----------------
    a = rnd(); b = rnd(); c = rnd(); d = rnd(); e = rnd();
    put_elem(0, a); put_elem(8, b); put_elem(16, c); put_elem(24, d); put_elem(32, e);
    prog = {};
    setup_iat(prog, 10);
    prog.push_back(mk(OP_READ, MUL0, 0, 1));
    prog.push_back(mk(OP_LAUNCH, MUL0));
    if (N_MUL == 1) begin
      // a single multiplier: a x b must be stored before d x e is loaded
      prog.push_back(mk(OP_WAIT, MUL0));
      prog.push_back(mk(OP_WRITE, MUL0, 5));
    end
    prog.push_back(mk(OP_READ, MUL1, 3, 4));
    prog.push_back(mk(OP_LAUNCH, MUL1));
    if (N_MUL > 1) begin
      prog.push_back(mk(OP_WAIT, MUL0));
      prog.push_back(mk(OP_WRITE, MUL0, 5));
    end
    prog.push_back(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 0));
    prog.push_back(mk(OP_READ, ADD, 5, 2));
    prog.push_back(mk(OP_LAUNCH, ADD));
    prog.push_back(mk(OP_WAIT, MUL1));
    prog.push_back(mk(OP_WRITE, MUL1, 6));
    prog.push_back(mk(OP_WAIT, ADD));
    prog.push_back(mk(OP_WRITE, ADD, 5));
    prog.push_back(mk(OP_READ, ADD, 5, 6));
    prog.push_back(mk(OP_LAUNCH, ADD));
    prog.push_back(mk(OP_WAIT, ADD));
    prog.push_back(mk(OP_WRITE, ADD, 5));
    // r - c, first operand bypassed from the adder's own result
    prog.push_back(mk(OP_READ, ADD, 5, 2, 1));
    prog.push_back(mk(OP_LAUNCH, ADD, 0, 0, 0, 14'd1));
    prog.push_back(mk(OP_WAIT, ADD));
    prog.push_back(mk(OP_WRITE, ADD, 7));
    // r^-1
    prog.push_back(mk(OP_READ, INV, 5, 5));
    prog.push_back(mk(OP_LAUNCH, INV));
    prog.push_back(mk(OP_WAIT, INV));
    prog.push_back(mk(OP_WRITE, INV, 9));
    prog.push_back(mk(OP_HALT));
    run_prog(prog, 5000);
    get_elem(40, r); get_elem(56, r7); get_elem(72, r9);
    exp_r = 256'((512'(mulmod(mulmod(a, b), rinv)) + 512'(c) + 512'(mulmod(mulmod(d, e), rinv))) % 512'(P256));
    chk(r == exp_r, "program A: ((a x b) + c) + (d x e)");
    chk(r7 == 256'((512'(exp_r) + 512'(P256) - 512'(c)) % 512'(P256)), "program A: bypassed r - c");
    chk(mulmod(r9, exp_r) == 1, "program A: inverse");

    // ---------------- program B ----------------
    for (int lam = 1; lam <= 2; lam++) begin
      int l_loop, l_end, l_addq, i_bnz_end, i_bnz_np, i_bnz_dbl, i_call1, i_call2, i_jmp, l_np, l_dbl;
      pt = rnd();
      for (int i = 0; i < 8; i++) k[i*32 +: 32] = $urandom;
      for (int i = 0; i < 8; i++) hw(HREG_KEY, i, k[i*32 +: 32]);
      hw(HREG_LAMBDA, 0, 3'(lam));
      put_elem(56, 0);   // Q, entry 7
      put_elem(64, pt);  // P, entry 8
      prog = {};
      setup_iat(prog, 9);
      prog.push_back(mk(OP_WRITEK, 0, 0, 0, 0, 14'd8));
      prog.push_back(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 0));
      l_loop = prog.size();
      prog.push_back(mk(OP_TST, FLAG_KDONE));
      i_bnz_end = prog.size(); prog.push_back(0);
      prog.push_back(mk(OP_CMPD, 0, 0, 0, 0, 14'(8'sd1)));
      i_bnz_np = prog.size(); prog.push_back(0);
      i_call1 = prog.size(); prog.push_back(0);
      l_np = prog.size();
      prog.push_back(mk(OP_CMPD, 0, 0, 0, 0, {6'd0, 8'hFF}));
      i_bnz_dbl = prog.size(); prog.push_back(0);
      prog.push_back(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 14'd1));
      i_call2 = prog.size(); prog.push_back(0);
      prog.push_back(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 0));
      l_dbl = prog.size();
      prog.push_back(mk(OP_READ, ADD, 8, 8));
      prog.push_back(mk(OP_LAUNCH, ADD));
      prog.push_back(mk(OP_WAIT, ADD));
      prog.push_back(mk(OP_WRITE, ADD, 8));
      prog.push_back(mk(OP_SET, FLAG_KNEXT, 0, 0, 0, 14'd1));
      i_jmp = prog.size(); prog.push_back(0);
      l_end = prog.size();
      prog.push_back(mk(OP_HALT));
      l_addq = prog.size();
      prog.push_back(mk(OP_READ, ADD, 7, 8));
      prog.push_back(mk(OP_LAUNCH, ADD));
      prog.push_back(mk(OP_WAIT, ADD));
      prog.push_back(mk(OP_WRITE, ADD, 7));
      prog.push_back(mk(OP_RET));
      prog[i_bnz_end] = mk(OP_BNZ, 0, 0, 0, 0, 14'(l_end));
      prog[i_bnz_np]  = mk(OP_BNZ, 0, 0, 0, 0, 14'(l_np));
      prog[i_call1]   = mk(OP_CALL, 0, 0, 0, 0, 14'(l_addq));
      prog[i_bnz_dbl] = mk(OP_BNZ, 0, 0, 0, 0, 14'(l_dbl));
      prog[i_call2]   = mk(OP_CALL, 0, 0, 0, 0, 14'(l_addq));
      prog[i_jmp]     = mk(OP_JMP, 0, 0, 0, 0, 14'(l_loop));
      run_prog(prog, 60000);
      get_elem(56, q);
      chk(q == mulmod(k % P256, pt), $sformatf("program B: [k]P, lambda=%0d", lam));
    end

    // ---------------- program C: binary field F(2^233) ----------------
    if (HAS_F2M) begin
      logic [255:0] f233, fa, fb, fr, fs, pr, fi;
      f233 = (256'd1 << 233) | (256'd1 << 74) | 256'd1;
      fa = rnd() & ((256'd1 << 233) - 1); fb = rnd() & ((256'd1 << 233) - 1);
      for (int i = 0; i < 8; i++) hw(HREG_MOD, i, f233[i*32 +: 32]);
      put_elem(0, fa); put_elem(8, fb);
      prog = {};
      setup_iat(prog, 4);
      prog.push_back(mk(OP_READ, 4'(2 + N_MUL), 0, 1));
      prog.push_back(mk(OP_LAUNCH, 4'(2 + N_MUL), 0, 0, 0, 14'd1));
      prog.push_back(mk(OP_WAIT, 4'(2 + N_MUL)));
      prog.push_back(mk(OP_WRITE, 4'(2 + N_MUL), 2));
      prog.push_back(mk(OP_READ, 4'(2 + N_MUL), 2, 0));
      prog.push_back(mk(OP_LAUNCH, 4'(2 + N_MUL), 0, 0, 0, 14'd0));
      prog.push_back(mk(OP_WAIT, 4'(2 + N_MUL)));
      prog.push_back(mk(OP_WRITE, 4'(2 + N_MUL), 3));
      prog.push_back(mk(OP_READ, 4'(2 + N_MUL), 2, 2));
      prog.push_back(mk(OP_LAUNCH, 4'(2 + N_MUL), 0, 0, 0, 14'd2));
      prog.push_back(mk(OP_WAIT, 4'(2 + N_MUL)));
      prog.push_back(mk(OP_WRITE, 4'(2 + N_MUL), 1));
      prog.push_back(mk(OP_HALT));
      run_prog(prog, 5000);
      get_elem(16, fr); get_elem(24, fs); get_elem(8, fi);
      pr = f2m_mul(fa, fb, f233);
      chk(fr == pr, "program C: F2m product");
      chk(fs == (pr ^ fa), "program C: F2m sum");
      chk(f2m_mul(fr, fi, f233) == 1, "program C: F2m inverse");
      chk(n_f2m == 3, "F2m unit launched");
    end

    $display("mechanisms: parallel=%0d stall=%0d bypass=%0d sub=%0d inv=%0d call=%0d ret=%0d branch=%0d knext=%0d negdigit=%0d",
             n_par, n_stall, n_byp, n_sub, n_inv, n_call, n_ret, n_br, n_knext, n_neg);
    chk(n_par > 0, "units ran in parallel");
    chk(n_stall > 0, "WAIT stalled");
    chk(n_byp > 0, "bypass load");
    chk(n_sub > 0, "subtraction mode");
    chk(n_inv > 0, "inversion");
    chk(n_call > 0 && n_ret == n_call, "CALL/RET");
    chk(n_br > 0, "branch taken");
    chk(n_knext > 0, "key digits consumed");
    chk(n_neg > 0, "negative NAF digit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
