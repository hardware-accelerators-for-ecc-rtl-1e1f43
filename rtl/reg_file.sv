// reg_file: the accelerator's register file, a dual-port memory of w-bit words.
//
// Field elements are stored as runs of w-bit words (x[0] at the lowest address)
// and are streamed one word per cycle to and from the functional units. Port A
// reads or writes (a_we), port B only reads, so a READ instruction fetches the
// words x[i] and y[i] of two operands in the same cycle while a WRITE stores a
// result word r[i] through port A. Both reads are synchronous: the data for an
// address presented in cycle t appears in cycle t+1, as in an FPGA block RAM.
// A write and a read of the same port return the old word (read-first).
//
// The dual-port organisation, the w-bit word width and the 10-bit physical
// address (550+ words for 16 registers of 600 bits at w = 16) follow the
// accelerator description; the read latency and read-first behaviour are this
// design's choice. Contents are not reset, as in a block RAM.
module reg_file #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
