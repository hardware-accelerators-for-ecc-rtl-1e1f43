// tb_fu_interconnect: self-checking test of the unit interconnect.
//
// Drives random load, launch and store requests for three units and checks
// that only the addressed unit sees its load or start strobe, that loads of
// word indices beyond NW are suppressed, and that the store path returns the
// addressed unit's result word.
module tb_fu_interconnect;
  localparam int W = 32, NW = 8, N_FU = 3, LW = 10, IW = $clog2(NW + 1);

  logic ld_valid, ld_bypass, launch, fu_ld_bypass;
  logic [3:0] ld_fu, launch_fu, wr_fu;
  logic [LW-1:0] ld_idx, wr_idx;
  logic [W-1:0] rf_x, rf_y, fu_ld_x, fu_ld_y, rf_wdata;
  logic [N_FU-1:0] fu_ld_en, fu_start;
  logic [IW-1:0] fu_ld_idx, fu_rd_idx;
  logic [N_FU-1:0][W-1:0] fu_rd_word;

  fu_interconnect #(.W(W), .NW(NW), .N_FU(N_FU), .LW(LW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic [N_FU-1:0] exp_ld, exp_st;
    for (int t = 0; t < 500; t++) begin
      ld_valid = 1'($urandom); ld_fu = 4'($urandom_range(0, 4)); ld_idx = LW'($urandom_range(0, 10));
      ld_bypass = 1'($urandom); rf_x = $urandom; rf_y = $urandom;
      launch = 1'($urandom); launch_fu = 4'($urandom_range(0, 4));
      wr_fu = 4'($urandom_range(0, N_FU - 1)); wr_idx = LW'($urandom_range(0, NW - 1));
      for (int f = 0; f < N_FU; f++) fu_rd_word[f] = $urandom;
      #1;
      exp_ld = '0; exp_st = '0;
      for (int f = 0; f < N_FU; f++) begin
        exp_ld[f] = ld_valid && ld_fu == f && ld_idx < NW;
        exp_st[f] = launch && launch_fu == f;
      end
      checks += 6;
      if (fu_ld_en != exp_ld) begin failures++; $display("FAIL ld_en %b exp %b", fu_ld_en, exp_ld); end
      if (fu_start != exp_st) begin failures++; $display("FAIL start %b exp %b", fu_start, exp_st); end
      if (fu_ld_x != rf_x || fu_ld_y != rf_y) begin failures++; $display("FAIL load data"); end
      if (fu_ld_bypass != ld_bypass) begin failures++; $display("FAIL bypass"); end
      if (rf_wdata != fu_rd_word[wr_fu]) begin failures++; $display("FAIL store data"); end
      if (fu_rd_idx != IW'(wr_idx)) begin failures++; $display("FAIL store index"); end
      if (exp_ld != 0) begin
        checks++;
        if (fu_ld_idx != IW'(ld_idx)) begin failures++; $display("FAIL load index"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
