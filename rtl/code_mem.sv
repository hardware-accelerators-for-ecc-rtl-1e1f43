// code_mem: program memory of the accelerator.
//
// Holds the 32-bit instructions executed by the controller. Programs are
// downloaded through a private write port that the host interface drives
// directly, so code never passes through the register file or the units.
// With WRITABLE = 0 the write port is ignored and the memory behaves as a ROM
// whose contents come from INIT_FILE at configuration time (for an FPGA, the
// program is part of the bitstream). The read is synchronous: the instruction
// at rd_addr presented in cycle t is on instr in cycle t+1.
//
// The private download path and the ROM mode follow the accelerator
// description; the depth (1024 words), the 32-bit instruction width and the
// read latency are this design's choices.
module code_mem #(
  parameter int unsigned DEPTH     = 1024,
  parameter bit          WRITABLE  = 1'b1,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   instr
);

  logic [31:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (WRITABLE && we) mem[waddr] <= wdata;
    instr <= mem[rd_addr];
  end

endmodule
