// fu_operands: local operand registers shared by every functional unit.
//
// A READ instruction streams the words x[i] and y[i] of two field elements into
// a unit, one pair per cycle (ld_en, ld_idx). This helper stores them in the
// unit's local registers and records the operand length as the highest index
// loaded plus one, so units work on elements of any length up to NW words.
// When ld_bypass is set the first operand word is taken from the unit's own
// previous result (r_words) instead of from the register file, which saves a
// WRITE/READ round trip when a result feeds the same unit again.
//
// Local registers and the output-to-input bypass are named by the accelerator
// description as unit options; their exact form here is this design's own.
module fu_operands #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 8,
  localparam int unsigned IW = $clog2(NW + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  logic [IW-1:0]         ld_idx,
  input  logic [W-1:0]          ld_x,
  input  logic [W-1:0]          ld_y,
  input  logic                  ld_bypass,
  input  logic [NW-1:0][W-1:0]  r_words,
  output logic [NW-1:0][W-1:0]  x_words,
  output logic [NW-1:0][W-1:0]  y_words,
  output logic [IW-1:0]         nw
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_words <= '0;
      y_words <= '0;
      nw      <= IW'(NW);
    end else if (ld_en && ld_idx < IW'(NW)) begin
      x_words[ld_idx] <= ld_bypass ? r_words[ld_idx] : ld_x;
      y_words[ld_idx] <= ld_y;
      nw              <= ld_idx + 1'b1;
      // a new operand starting at word 0 clears the words above it
      if (ld_idx == '0) begin
        for (int k = 1; k < NW; k++) begin
          x_words[k] <= '0;
          y_words[k] <= '0;
        end
      end
    end
  end

endmodule
