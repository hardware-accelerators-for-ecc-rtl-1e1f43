// addr_table: intermediate address table (IAT) with hardware word loop.
//
// A program names a field element by a table entry @Rid, never by a physical
// address. Each entry holds the offset of the element's first word and its
// number of w-bit words; SETADDR0 writes the offset, SETADDRN the word count.
// Two independent read channels (one per register-file port) each translate
// an entry and an index i into the physical address offset + i, so the
// controller runs the loop x[0], x[1], ..., x[l-1] for a single LOAD-style
// instruction. Lookups are combinational; table writes take effect at the next
// clock edge. Reset clears every entry.
//
// The two values per entry and the linear loop follow the accelerator
// description; the number of entries (16, the upper end of the 5-16 registers
// a curve needs) and the combinational lookup are this design's choices. The
// randomized address mode mentioned alongside is not implemented.
module addr_table #(
  parameter int unsigned NREG = 16,
  parameter int unsigned AW   = 10,
  parameter int unsigned LW   = 10,
  localparam int unsigned RW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          set_off,     // SETADDR0
  input  logic          set_len,     // SETADDRN
  input  logic [RW-1:0] set_rid,
  input  logic [AW-1:0] set_value_off,
  input  logic [LW-1:0] set_value_len,
  input  logic [RW-1:0] a_rid,
  input  logic [LW-1:0] a_idx,
  output logic [AW-1:0] a_phys,
  output logic [LW-1:0] a_len,
  input  logic [RW-1:0] b_rid,
  input  logic [LW-1:0] b_idx,
  output logic [AW-1:0] b_phys,
  output logic [LW-1:0] b_len
);

  logic [AW-1:0] off [NREG];
  logic [LW-1:0] len [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        off[r] <= '0;
        len[r] <= '0;
      end
    end else begin
      if (set_off) off[set_rid] <= set_value_off;
      if (set_len) len[set_rid] <= set_value_len;
    end
  end

  assign a_phys = off[a_rid] + AW'(a_idx);
  assign a_len  = len[a_rid];
  assign b_phys = off[b_rid] + AW'(b_idx);
  assign b_len  = len[b_rid];

endmodule
