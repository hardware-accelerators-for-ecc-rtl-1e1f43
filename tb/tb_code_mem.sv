// tb_code_mem: self-checking test of the program memory.
//
// Downloads random instructions through the private write port of a writable
// instance and reads them back with one cycle of latency; a second instance
// built as a ROM (WRITABLE = 0) must ignore the same writes and keep the
// contents it was given at start-up.
module tb_code_mem;
  localparam int DEPTH = 1024, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [AW-1:0] waddr, rd_addr;
  logic [31:0] wdata, instr, instr_rom;
  logic [31:0] shadow [DEPTH];

  code_mem #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .rd_addr, .instr);
  code_mem #(.DEPTH(DEPTH), .WRITABLE(1'b0)) rom (.clk, .we, .waddr, .wdata, .rd_addr, .instr(instr_rom));

  int checks = 0, failures = 0;

  initial begin
    int a;
    logic [31:0] rom_init [16];
    we = 0; waddr = 0; wdata = 0; rd_addr = 0;
    // snapshot of the ROM's start-up contents
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); rd_addr = AW'(i);
      @(negedge clk); rom_init[i] = instr_rom;
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      a = $urandom_range(0, DEPTH - 1);
      rd_addr = AW'(a);
      @(negedge clk);
      checks++;
      if (instr != shadow[a]) begin failures++; $display("FAIL @%0d", a); end
    end
    for (int i = 0; i < 16; i++) begin
      rd_addr = AW'(i);
      @(negedge clk);
      checks++;
      if (instr_rom != rom_init[i]) begin failures++; $display("FAIL ROM written @%0d", i); end
    end
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
