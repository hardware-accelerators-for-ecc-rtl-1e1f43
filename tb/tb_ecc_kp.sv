// tb_ecc_kp: complete elliptic-curve scalar multiplications Q = [k]G on the
// NIST P-256 and P-192 curves (y^2 = x^3 - 3x + b over a prime field), run by
// the accelerator in its default configuration (w = 32, one adder/subtracter,
// one inverter, one Montgomery multiplier) with random keys, for key
// recodings lambda = 1 (binary, double-and-add), 2 (NAF) and the wider
// lambda-NAFs. P-256 uses 8-word elements and P-192 6-word elements, set
// only by the word counts the program writes into the address table.
//
// The program keeps field elements in Montgomery form (x * 2^(w*l) mod p)
// and points in affine coordinates. It scans the key right to left through
// the key unit. For a digit d = +/-1 it adds +/-Q to the accumulator R; for
// d = +/-(2i+1) it copies Q to a scratch point S, doubles Q, adds the new Q
// to S i times (S = (2i+1) Q_old), then re-points the address-table entries
// of Q at S to add +/-S to R, and points them back. Q is doubled once per
// digit either way. -Q is (x, 0 - y), formed on the adder with the OPMODE
// flag. The accumulator starts as the point at infinity, which the program
// tracks in the USER flag; the first addition copies. Every point operation
// uses one inversion; the numerator of the slope is multiplied by R^3 mod p
// while the inverter runs, so that its product with the plain inverse is in
// Montgomery form. The doubling computes x^2 and 2y on two units at once,
// and chains 3x^2 + a through the adder's output-to-input bypass. At the end
// the program leaves Montgomery form by a product with 1.
//
// Each result is compared with a left-to-right double-and-add in ordinary
// (non-Montgomery) arithmetic written in the testbench, and checked to lie on
// the curve. The affine formulas, the curves and the program are this
// testbench's choices; the accelerator runs whatever program it is given.
module tb_ecc_kp;
  import ecc_pkg::*;
  localparam int W = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] h_addr;
  logic h_we, h_re, h_rvalid, busy, done;
  logic [W-1:0] h_wdata, h_rdata;

  ecc_acc_top dut (.clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata,
    .h_rdata, .h_rvalid, .busy, .done);

  int checks = 0, failures = 0;
  int n_par = 0, n_byp = 0, n_inv = 0, n_neg = 0, n_knext = 0, n_wide = 0, n_repoint = 0;

  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.fu_busy) >= 2) n_par++;
    if (dut.fu_ld_bypass && |dut.fu_ld_en) n_byp++;
    if (dut.fu_start[1]) n_inv++;
    if (dut.k_next) begin
      n_knext++;
      if (dut.k_digit < 0) n_neg++;
      if (dut.k_digit >= 3 || dut.k_digit <= -3) n_wide++;
    end
    if (int'(dut.u_ctrl.st) == 2 && dut.u_ctrl.ir.op == OP_SETADDR0 && dut.u_ctrl.ir.imm == 14'(8 * 13))
      n_repoint++;
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

  // element r of the program lives at register-file words 8r .. 8r+l-1
  task automatic put_elem(int r, int l, logic [255:0] v);
    for (int i = 0; i < l; i++) hw(HREG_RF, 8 * r + i, v[i*32 +: 32]);
  endtask

  task automatic get_elem(int r, int l, output logic [255:0] v);
    logic [W-1:0] d;
    v = '0;
    for (int i = 0; i < l; i++) begin hr(HREG_RF, 8 * r + i, d); v[i*32 +: 32] = d; end
  endtask

  // ---------------- reference arithmetic, modulo the current prime cp ----------------
  logic [255:0] cp, cb;

  function automatic logic [255:0] mulm(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) * 512'(b)) % 512'(cp));
  endfunction
  function automatic logic [255:0] addm(logic [255:0] a, logic [255:0] b);
    return 256'((257'(a) + 257'(b)) % 257'(cp));
  endfunction
  function automatic logic [255:0] subm(logic [255:0] a, logic [255:0] b);
    return 256'((257'(a) + 257'(cp) - 257'(b)) % 257'(cp));
  endfunction
  function automatic logic [255:0] powm(logic [255:0] a, logic [255:0] e);
    logic [255:0] r = 1;
    for (int i = 255; i >= 0; i--) begin
      r = mulm(r, r);
      if (e[i]) r = mulm(r, a);
    end
    return r;
  endfunction
  function automatic logic [255:0] invm(logic [255:0] a);
    return powm(a, cp - 2);
  endfunction

  // affine point operations; inf marks the point at infinity
  typedef struct { logic [255:0] x, y; bit inf; } pt_t;

  function automatic pt_t ref_dbl(pt_t a);
    pt_t r;
    logic [255:0] l;
    if (a.inf || a.y == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
    l = mulm(subm(mulm(3, mulm(a.x, a.x)), 3), invm(addm(a.y, a.y)));
    r.inf = 0;
    r.x = subm(subm(mulm(l, l), a.x), a.x);
    r.y = subm(mulm(l, subm(a.x, r.x)), a.y);
    return r;
  endfunction

  function automatic pt_t ref_add(pt_t a, pt_t b);
    pt_t r;
    logic [255:0] l;
    if (a.inf) return b;
    if (b.inf) return a;
    if (a.x == b.x) return (a.y == b.y) ? ref_dbl(a) : '{x: 0, y: 0, inf: 1};
    l = mulm(subm(b.y, a.y), invm(subm(b.x, a.x)));
    r.inf = 0;
    r.x = subm(subm(mulm(l, l), a.x), b.x);
    r.y = subm(mulm(l, subm(a.x, r.x)), a.y);
    return r;
  endfunction

  function automatic pt_t ref_kp(logic [255:0] k, pt_t g);
    pt_t r = '{x: 0, y: 0, inf: 1};
    for (int i = 255; i >= 0; i--) begin
      r = ref_dbl(r);
      if (k[i]) r = ref_add(r, g);
    end
    return r;
  endfunction

  function automatic bit on_curve(logic [255:0] x, logic [255:0] y);
    return mulm(y, y) == addm(subm(mulm(x, mulm(x, x)), mulm(3, x)), cb);
  endfunction

  function automatic logic [31:0] neg_inv(logic [31:0] p0);
    logic [31:0] x = 1;
    for (int k = 0; k < 6; k++) x = x * (2 - p0 * x);
    return -x;
  endfunction

  // ---------------- program ----------------
  // element numbers (address-table entries); entry e normally points at area e
  localparam logic [3:0] QX = 0, QY = 1, RX = 2, RY = 3, ZERO = 4, AM = 5, R3 = 6,
                         T1 = 7, T2 = 8, T3 = 9, LAM = 10, TY = 11, ONE = 12,
                         SX = 13, SY = 14;
  localparam int NELEM = 15;
  localparam int MAXD = 15;                  // largest digit magnitude handled (lambda = 5)
  localparam logic [3:0] ADD = FU_ADDSUB, INV = FU_INV, MUL = FU_MUL0;

  logic [31:0] prog [$];
  int lbl [string];                          // label addresses, from the previous pass

  function automatic void emit(logic [31:0] i);
    prog.push_back(i);
  endfunction
  function automatic void here(string n);
    lbl[n] = prog.size();
  endfunction
  function automatic logic [13:0] at(string n);
    return lbl.exists(n) ? 14'(lbl[n]) : 14'd0;
  endfunction
  function automatic void jump(opcode_e o, string n);
    emit(mk(o, 0, 0, 0, 0, at(n)));
  endfunction
  function automatic void point(logic [3:0] e, logic [3:0] area);
    emit(mk(OP_SETADDR0, 0, e, 0, 0, 14'(8 * area)));
  endfunction

  // unit result = op(a, b); MODE bit 0 = subtract on the adder
  function automatic void op(logic [3:0] fu, logic [3:0] a, logic [3:0] b, bit sub);
    emit(mk(OP_READ, fu, a, b));
    emit(mk(OP_LAUNCH, fu, 0, 0, 0, 14'(sub)));
    emit(mk(OP_WAIT, fu));
  endfunction

  // unit result = op(own previous result, b)
  function automatic void op_byp(logic [3:0] fu, logic [3:0] b, bit sub);
    emit(mk(OP_READ, fu, 0, b, 1));
    emit(mk(OP_LAUNCH, fu, 0, 0, 0, 14'(sub)));
    emit(mk(OP_WAIT, fu));
  endfunction

  function automatic void wr(logic [3:0] fu, logic [3:0] dst);
    emit(mk(OP_WRITE, fu, dst));
  endfunction

  // LAM = num / den in Montgomery form. The inverter is started on den, and
  // num * R^3 is formed on the multiplier while it runs; the product with the
  // plain inverse then lands in Montgomery form.
  function automatic void slope(logic [3:0] num, logic [3:0] den);
    emit(mk(OP_READ, INV, den, den));
    emit(mk(OP_LAUNCH, INV));
    op(MUL, num, R3, 0); wr(MUL, num);
    emit(mk(OP_WAIT, INV)); wr(INV, den);
    op(MUL, num, den, 0); wr(MUL, LAM);
  endfunction

  function automatic void build_pass(int nwords);
    prog = {};
    for (int r = 0; r < NELEM; r++) begin
      point(4'(r), 4'(r));
      emit(mk(OP_SETADDRN, 0, 4'(r), 0, 0, 14'(nwords)));
    end
    emit(mk(OP_WRITEK, 0, 0, 0, 0, 14'(nwords)));
    emit(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 0));
    emit(mk(OP_SET, FLAG_USER, 0, 0, 0, 0));

    // main loop over the key digits, least significant first
    here("loop");
    emit(mk(OP_TST, FLAG_KDONE));
    jump(OP_BNZ, "end");
    for (int d = 1; d <= MAXD; d += 2) begin
      emit(mk(OP_CMPD, 0, 0, 0, 0, 14'(8'(d))));
      jump(OP_BZ, $sformatf("p%0d", d));
      emit(mk(OP_CMPD, 0, 0, 0, 0, 14'(8'(-d))));
      jump(OP_BZ, $sformatf("m%0d", d));
    end
    here("dbl_next");
    jump(OP_CALL, "dbl");
    here("knext");
    emit(mk(OP_SET, FLAG_KNEXT, 0, 0, 0, 14'd1));
    jump(OP_JMP, "loop");
    for (int d = 1; d <= MAXD; d += 2) begin
      for (int s = 0; s < 2; s++) begin
        here($sformatf("%s%0d", s ? "m" : "p", d));
        if (d == 1) begin
          if (s) emit(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 14'd1));
          jump(OP_CALL, "addq");
          jump(OP_JMP, "dbl_next");
        end else begin
          jump(OP_CALL, $sformatf("mk%0d", d));   // S = d Q, Q doubled
          point(QX, SX); point(QY, SY);
          if (s) emit(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 14'd1));
          jump(OP_CALL, "addq");
          point(QX, QX); point(QY, QY);
          jump(OP_JMP, "knext");
        end
      end
    end
    // leave Montgomery form: x * 1 * R^-1
    here("end");
    op(MUL, RX, ONE, 0); wr(MUL, RX);
    op(MUL, RY, ONE, 0); wr(MUL, RY);
    emit(mk(OP_HALT));

    // addq: R = R + (QX, +/-QY), sign from OPMODE on entry; addq_nz skips the
    // point-at-infinity test
    here("addq");
    emit(mk(OP_TST, FLAG_USER));
    jump(OP_BZ, "first");
    here("addq_nz");
    op(ADD, ZERO, QY, 0); wr(ADD, TY);       // TY = 0 +/- QY
    emit(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 0));
    op(ADD, TY, RY, 1); wr(ADD, T1);         // T1 = ty - Ry
    op(ADD, QX, RX, 1); wr(ADD, T2);         // T2 = Qx - Rx
    slope(T1, T2);
    op(MUL, LAM, LAM, 0); wr(MUL, T1);       // T1 = lam^2
    op(ADD, T1, RX, 1);
    op_byp(ADD, QX, 1); wr(ADD, T2);         // T2 = x3 = lam^2 - Rx - Qx
    op(ADD, RX, T2, 1); wr(ADD, T3);         // T3 = Rx - x3
    op(MUL, LAM, T3, 0); wr(MUL, T1);
    op(ADD, T1, RY, 1); wr(ADD, RY);         // Ry = lam (Rx - x3) - Ry
    op(ADD, T2, ZERO, 0); wr(ADD, RX);       // Rx = x3
    emit(mk(OP_RET));
    here("first");
    op(ADD, ZERO, QY, 0); wr(ADD, RY);       // R = (Qx, 0 +/- Qy)
    emit(mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 0));
    op(ADD, QX, ZERO, 0); wr(ADD, RX);
    emit(mk(OP_SET, FLAG_USER, 0, 0, 0, 14'd1));
    emit(mk(OP_RET));

    // dbl: Q = 2Q
    here("dbl");
    emit(mk(OP_READ, MUL, QX, QX));
    emit(mk(OP_LAUNCH, MUL));                // x^2 on the multiplier ...
    op(ADD, QY, QY, 0); wr(ADD, T3);         // ... while the adder makes 2y
    emit(mk(OP_WAIT, MUL)); wr(MUL, T1);     // T1 = x^2
    op(ADD, T1, T1, 0);
    op_byp(ADD, T1, 0);
    op_byp(ADD, AM, 0); wr(ADD, T2);         // T2 = 3x^2 + a
    slope(T2, T3);
    op(MUL, LAM, LAM, 0); wr(MUL, T1);
    op(ADD, T1, QX, 1);
    op_byp(ADD, QX, 1); wr(ADD, T2);         // T2 = x3
    op(ADD, QX, T2, 1); wr(ADD, T3);         // T3 = x - x3
    op(MUL, LAM, T3, 0); wr(MUL, T1);
    op(ADD, T1, QY, 1); wr(ADD, QY);         // y3
    op(ADD, T2, ZERO, 0); wr(ADD, QX);       // x3
    emit(mk(OP_RET));

    // mk<d>: S = d Q and Q = 2Q, as S = Q, Q = 2Q, then (d-1)/2 times S = S + Q
    for (int d = 3; d <= MAXD; d += 2) begin
      here($sformatf("mk%0d", d));
      op(ADD, QX, ZERO, 0); wr(ADD, SX);
      op(ADD, QY, ZERO, 0); wr(ADD, SY);
      jump(OP_CALL, "dbl");
      point(RX, SX); point(RY, SY);
      for (int i = 0; i < (d - 1) / 2; i++) jump(OP_CALL, "addq_nz");
      point(RX, RX); point(RY, RY);
      emit(mk(OP_RET));
    end
  endfunction

  task automatic run_curve(string name, logic [255:0] p, logic [255:0] b, logic [255:0] gx,
                           logic [255:0] gy, int nwords, int lam);
    logic [255:0] rm, k, rx, ry;
    pt_t g, q;
    int cyc;
    cp = p; cb = b;
    g = '{x: gx, y: gy, inf: 0};
    chk(on_curve(gx, gy), {name, ": base point on the curve"});
    for (int i = 0; i < 8; i++) hw(HREG_MOD, i, p[i*32 +: 32]);
    hw(HREG_PINV, 0, neg_inv(p[31:0]));
    rm = powm(2, 256'(32 * nwords));          // R = 2^(w l) mod p
    lbl.delete();
    build_pass(nwords);
    build_pass(nwords);                       // second pass with the labels resolved
    for (int i = 0; i < prog.size(); i++) hw(HREG_CODE, i, prog[i]);

    k = '0;
    for (int i = 0; i < nwords; i++) k[i*32 +: 32] = $urandom;
    k[32 * nwords - 1] = 1'b0;               // below the group order
    for (int i = 0; i < 8; i++) hw(HREG_KEY, i, k[i*32 +: 32]);
    hw(HREG_LAMBDA, 0, 3'(lam));
    put_elem(QX, nwords, mulm(gx, rm));
    put_elem(QY, nwords, mulm(gy, rm));
    put_elem(ZERO, nwords, 0);
    put_elem(AM, nwords, subm(0, mulm(3, rm)));
    put_elem(R3, nwords, mulm(rm, mulm(rm, rm)));
    put_elem(ONE, nwords, 1);
    hw(HREG_CTRL, 0, 1);
    cyc = 0;
    while (!done && cyc < 3000000) begin @(negedge clk); cyc++; end
    chk(done, {name, ": program reached HALT"});
    get_elem(RX, nwords, rx); get_elem(RY, nwords, ry);
    q = ref_kp(k, g);
    $display("%s lambda=%0d: [k]G in %0d cycles, %0d instructions, k=%h", name, lam, cyc, prog.size(), k);
    chk(!q.inf && rx == q.x && ry == q.y, $sformatf("%s: [k]G, lambda=%0d", name, lam));
    chk(on_curve(rx, ry), $sformatf("%s: result on the curve, lambda=%0d", name, lam));
  endtask

  localparam logic [255:0] P256  = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;
  localparam logic [255:0] B256  = 256'h5AC635D8AA3A93E7B3EBBD55769886BC651D06B0CC53B0F63BCE3C3E27D2604B;
  localparam logic [255:0] GX256 = 256'h6B17D1F2E12C4247F8BCE6E563A440F277037D812DEB33A0F4A13945D898C296;
  localparam logic [255:0] GY256 = 256'h4FE342E2FE1A7F9B8EE7EB4A7C0F9E162BCE33576B315ECECBB6406837BF51F5;
  localparam logic [255:0] P192  = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEFFFFFFFFFFFFFFFF;
  localparam logic [255:0] B192  = 256'h64210519E59C80E70FA7E9AB72243049FEB8DEECC146B9B1;
  localparam logic [255:0] GX192 = 256'h188DA80EB03090F67CBF20EB43A18800F4FF0AFD82FF1012;
  localparam logic [255:0] GY192 = 256'h07192B95FFC8DA78631011ED6B24CDD573F977A11E794811;

  initial begin
    h_addr = 0; h_we = 0; h_re = 0; h_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_curve("P-256", P256, B256, GX256, GY256, 8, 1);
    run_curve("P-256", P256, B256, GX256, GY256, 8, 2);
    run_curve("P-256", P256, B256, GX256, GY256, 8, 5);
    run_curve("P-192", P192, B192, GX192, GY192, 6, 1);
    run_curve("P-192", P192, B192, GX192, GY192, 6, 3);
    run_curve("P-192", P192, B192, GX192, GY192, 6, 4);

    $display("mechanisms: parallel=%0d bypass=%0d inv=%0d knext=%0d negdigit=%0d widedigit=%0d repoint=%0d",
             n_par, n_byp, n_inv, n_knext, n_neg, n_wide, n_repoint);
    chk(n_par > 0, "units ran in parallel");
    chk(n_byp > 0, "bypass load");
    chk(n_inv > 0, "inversion");
    chk(n_knext > 0, "key digits consumed");
    chk(n_neg > 0, "negative NAF digit");
    chk(n_wide > 0, "digit of magnitude 3 or more");
    chk(n_repoint > 0, "address-table entry re-pointed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
