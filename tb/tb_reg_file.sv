// tb_reg_file: self-checking test of the dual-port register file.
//
// Writes random words to random addresses through port A while a shadow
// array in the testbench records them, then reads them back through both
// ports at once and checks the one-cycle read latency and read-first
// behaviour of port A.
module tb_reg_file;
  localparam int W = 32, DEPTH = 1024, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] a_addr, b_addr;
  logic a_we;
  logic [W-1:0] a_wdata, a_rdata, b_rdata;
  logic [W-1:0] shadow [DEPTH];
  bit written [DEPTH];

  reg_file #(.W(W), .DEPTH(DEPTH)) dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_rdata);

  int checks = 0, failures = 0;

  initial begin
    int ia, ib;
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = AW'(i); a_wdata = $urandom;
      shadow[i] = a_wdata; written[i] = 1;
    end
    @(negedge clk); a_we = 0;
    for (int t = 0; t < 500; t++) begin
      ia = $urandom_range(0, DEPTH - 1); ib = $urandom_range(0, DEPTH - 1);
      a_addr = AW'(ia); b_addr = AW'(ib);
      @(negedge clk);
      checks += 2;
      if (a_rdata != shadow[ia]) begin failures++; $display("FAIL port A @%0d", ia); end
      if (b_rdata != shadow[ib]) begin failures++; $display("FAIL port B @%0d", ib); end
    end
    // read-first: a write returns the old word on port A, port B sees the new one next cycle
    a_addr = 10'd77; b_addr = 10'd77; a_we = 1; a_wdata = ~shadow[77];
    @(negedge clk);
    a_we = 0;
    checks++;
    if (a_rdata != shadow[77]) begin failures++; $display("FAIL read-first"); end
    @(negedge clk);
    checks += 2;
    if (a_rdata != ~shadow[77]) begin failures++; $display("FAIL new word port A"); end
    if (b_rdata != ~shadow[77]) begin failures++; $display("FAIL new word port B"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
