// tb_ctrl: self-checking test of the instruction controller.
//
// A behavioural code memory (one cycle of read latency) holds a short
// program exercising every instruction kind; the testbench plays the address
// table (fixed word count 5), the units (unit 2 stays busy 20 cycles after
// its launch) and the key unit (digit 3, not done). It checks the side
// effects and their timing: table writes, the 5 load strobes of READ with
// indices 0..4 and the launch that follows exactly 5 cycles after the first,
// WAIT holding the program until the unit is idle (the store begins in the
// cycle after the first one with busy low), the 5 store strobes of
// WRITE, the taken BZ after CMPD, CALL/RET, the untaken BNZ after TST, SET
// KNEXT / OPMODE, WRITEK and HALT with done.
module tb_ctrl;
  import ecc_pkg::*;
  localparam int N_FU = 3, CAW = 10, AW = 10, LW = 10, NREG = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, running, done;
  logic [CAW-1:0] code_addr;
  logic [31:0] code_word;
  logic iat_set_off, iat_set_len, rf_we, ld_valid, ld_bypass, launch, k_load, k_next, k_done, opmode;
  logic [3:0] iat_set_rid, iat_a_rid, iat_b_rid;
  logic [AW-1:0] iat_set_off_val;
  logic [LW-1:0] iat_set_len_val, iat_idx, iat_a_len, iat_b_len, ld_idx, wr_idx, k_load_nw;
  logic [3:0] ld_fu, launch_fu, wr_fu;
  logic [7:0] launch_mode;
  logic [N_FU-1:0] fu_busy;
  logic signed [7:0] k_digit;
  logic [31:0] mem [1024];

  ctrl #(.N_FU(N_FU), .CAW(CAW), .AW(AW), .LW(LW), .NREG(NREG)) dut (.*);

  always_ff @(posedge clk) code_word <= mem[code_addr];

  assign iat_a_len = 10'd5;
  assign iat_b_len = 10'd5;
  assign k_digit = 8'sd3;
  assign k_done = 1'b0;

  int checks = 0, failures = 0, cyc = 0;
  int n_ld = 0, n_we = 0, first_ld = -1, launch2 = -1, first_we = -1, busy_end = -1;
  int n_knext = 0, n_kload = 0, n_setoff = 0, n_setlen = 0;
  int busy_cnt = 0;
  logic [3:0] launches [$];
  logic [7:0] modes [$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // unit model and event log
  always @(posedge clk) begin
    cyc++;
    if (busy_cnt > 0) busy_cnt--;
    if (launch && launch_fu == 2) busy_cnt = 20;
    if (rst_n && running) begin
      if (ld_valid) begin
        if (first_ld < 0) first_ld = cyc;
        chk(ld_fu == 1 && ld_idx == LW'(n_ld) && !ld_bypass, $sformatf("load strobe fu=%0d idx=%0d n=%0d cyc=%0d", ld_fu, ld_idx, n_ld, cyc));
        n_ld++;
      end
      if (launch) begin
        launches.push_back(launch_fu); modes.push_back(launch_mode);
        if (launch_fu == 2) launch2 = cyc;
      end
      if (rf_we) begin
        if (first_we < 0) first_we = cyc;
        chk(wr_fu == 2 && wr_idx == LW'(n_we) && iat_idx == LW'(n_we) && iat_a_rid == 6, "store strobe");
        n_we++;
      end
      if (iat_set_off) begin n_setoff++; chk(iat_set_rid == 3 && iat_set_off_val == 100, "SETADDR0"); end
      if (iat_set_len) begin n_setlen++; chk(iat_set_rid == 3 && iat_set_len_val == 5, "SETADDRN"); end
      if (k_next) n_knext++;
      if (k_load) begin n_kload++; chk(k_load_nw == 8, "WRITEK length"); end
    end
  end
  assign fu_busy = {busy_cnt > 0, 2'b00};
  always @(posedge clk) if (launch2 >= 0 && busy_end < 0 && busy_cnt == 0 && running) busy_end = cyc;

  initial begin
    int c;
    for (int i = 0; i < 1024; i++) mem[i] = mk(OP_HALT);
    mem[0]  = mk(OP_SETADDR0, 0, 3, 0, 0, 14'd100);
    mem[1]  = mk(OP_SETADDRN, 0, 3, 0, 0, 14'd5);
    mem[2]  = mk(OP_READ, 1, 3, 4);
    mem[3]  = mk(OP_LAUNCH, 2, 0, 0, 0, 14'd7);
    mem[4]  = mk(OP_WAIT, 2);
    mem[5]  = mk(OP_WRITE, 2, 6);
    mem[6]  = mk(OP_CMPD, 0, 0, 0, 0, 14'd3);
    mem[7]  = mk(OP_BZ, 0, 0, 0, 0, 14'd10);
    mem[8]  = mk(OP_LAUNCH, 0);
    mem[9]  = mk(OP_HALT);
    mem[10] = mk(OP_CALL, 0, 0, 0, 0, 14'd20);
    mem[11] = mk(OP_TST, FLAG_KDONE);
    mem[12] = mk(OP_BNZ, 0, 0, 0, 0, 14'd8);
    mem[13] = mk(OP_SET, FLAG_KNEXT, 0, 0, 0, 14'd1);
    mem[14] = mk(OP_SET, FLAG_OPMODE, 0, 0, 0, 14'd1);
    mem[15] = mk(OP_WRITEK, 0, 0, 0, 0, 14'd8);
    mem[16] = mk(OP_HALT);
    mem[20] = mk(OP_LAUNCH, 1, 0, 0, 0, 14'd1);
    mem[21] = mk(OP_RET);
    start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    c = 0;
    while (!done && c < 500) begin @(negedge clk); c++; end
    chk(done && !running, "HALT reached");
    chk(n_setoff == 1 && n_setlen == 1, "table writes");
    chk(n_ld == 5, "READ loads 5 words");
    chk(launch2 - first_ld == 5, "READ takes 5 + 1 cycles");
    chk(n_we == 5, "WRITE stores 5 words");
    chk(first_we == busy_end + 2, $sformatf("WAIT releases when the unit is idle (%0d vs %0d, launch %0d)", first_we, busy_end, launch2));
    chk(launches.size() == 2, "two launches");
    if (launches.size() == 2) begin
      chk(launches[0] == 2 && modes[0] == 7, "LAUNCH unit 2 mode 7");
      chk(launches[1] == 1 && modes[1] == 1, "LAUNCH unit 1 via CALL");
    end
    chk(n_knext == 1, "SET KNEXT");
    chk(opmode == 1, "SET OPMODE");
    chk(n_kload == 1, "WRITEK");
    chk(dut.sp == 0, "stack empty after RET");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
