// tb_addr_table: self-checking test of the intermediate address table.
//
// Programs random (offset, length) pairs into all 16 entries, then checks
// that both lookup channels return offset + i and the stored length for
// random entries and indices, and that entries reset to zero.
module tb_addr_table;
  localparam int NREG = 16, AW = 10, LW = 10, RW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic set_off, set_len;
  logic [RW-1:0] set_rid, a_rid, b_rid;
  logic [AW-1:0] set_value_off, a_phys, b_phys;
  logic [LW-1:0] set_value_len, a_idx, b_idx, a_len, b_len;
  logic [AW-1:0] offs [NREG];
  logic [LW-1:0] lens [NREG];

  addr_table #(.NREG(NREG), .AW(AW), .LW(LW)) dut (.clk, .rst_n, .set_off, .set_len, .set_rid,
    .set_value_off, .set_value_len, .a_rid, .a_idx, .a_phys, .a_len, .b_rid, .b_idx, .b_phys, .b_len);

  int checks = 0, failures = 0;

  initial begin
    int ra, rb, ia, ib;
    set_off = 0; set_len = 0; set_rid = 0; set_value_off = 0; set_value_len = 0;
    a_rid = 3; b_rid = 9; a_idx = 0; b_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    checks += 2;
    if (a_phys != 0 || a_len != 0) begin failures++; $display("FAIL reset A"); end
    if (b_phys != 0 || b_len != 0) begin failures++; $display("FAIL reset B"); end
    for (int r = 0; r < NREG; r++) begin
      offs[r] = AW'($urandom_range(0, 900)); lens[r] = LW'($urandom_range(1, 20));
      @(negedge clk); set_off = 1; set_rid = RW'(r); set_value_off = offs[r];
      @(negedge clk); set_off = 0; set_len = 1; set_value_len = lens[r];
    end
    @(negedge clk); set_len = 0;
    for (int t = 0; t < 300; t++) begin
      ra = $urandom_range(0, NREG - 1); rb = $urandom_range(0, NREG - 1);
      ia = $urandom_range(0, 20); ib = $urandom_range(0, 20);
      a_rid = RW'(ra); b_rid = RW'(rb); a_idx = LW'(ia); b_idx = LW'(ib);
      #1;
      checks += 4;
      if (a_phys != AW'(offs[ra] + ia)) begin failures++; $display("FAIL a_phys"); end
      if (b_phys != AW'(offs[rb] + ib)) begin failures++; $display("FAIL b_phys"); end
      if (a_len != lens[ra]) begin failures++; $display("FAIL a_len"); end
      if (b_len != lens[rb]) begin failures++; $display("FAIL b_len"); end
    end
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
