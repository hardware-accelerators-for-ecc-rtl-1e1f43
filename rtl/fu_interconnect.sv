// fu_interconnect: data and control routing between register file and units.
//
// The register file's two read ports deliver the words x[i] and y[i] of a
// READ; the interconnect forwards them to every unit but asserts the load
// strobe only for the addressed unit (ld_fu), and only for word indices the
// units can hold (below NW). For a WRITE it selects the result word r[i] of
// the addressed unit (wr_fu) as the register-file write data. LAUNCH becomes a
// one-cycle start strobe on the addressed unit. All paths are combinational.
//
// The shared w-bit data paths with a few control bits per unit follow the
// accelerator description; the broadcast-plus-strobe structure is this
// design's own.
module fu_interconnect #(
  parameter int unsigned W    = 32,
  parameter int unsigned NW   = 8,
  parameter int unsigned N_FU = 3,
  parameter int unsigned LW   = 10,
  localparam int unsigned IW  = $clog2(NW + 1)
) (
  // load path, register file to units
  input  logic                       ld_valid,
  input  logic [3:0]                 ld_fu,
  input  logic [LW-1:0]              ld_idx,
  input  logic                       ld_bypass,
  input  logic [W-1:0]               rf_x,
  input  logic [W-1:0]               rf_y,
  output logic [N_FU-1:0]            fu_ld_en,
  output logic [IW-1:0]              fu_ld_idx,
  output logic [W-1:0]               fu_ld_x,
  output logic [W-1:0]               fu_ld_y,
  output logic                       fu_ld_bypass,
  // launch path
  input  logic                       launch,
  input  logic [3:0]                 launch_fu,
  output logic [N_FU-1:0]            fu_start,
  // store path, units to register file
  input  logic [3:0]                 wr_fu,
  input  logic [LW-1:0]              wr_idx,
  output logic [IW-1:0]              fu_rd_idx,
  input  logic [N_FU-1:0][W-1:0]     fu_rd_word,
  output logic [W-1:0]               rf_wdata
);

  always_comb begin
    fu_ld_en  = '0;
    fu_start  = '0;
    for (int f = 0; f < N_FU; f++) begin
      fu_ld_en[f] = ld_valid && (ld_fu == 4'(f)) && (ld_idx < LW'(NW));
      fu_start[f] = launch && (launch_fu == 4'(f));
    end
  end

  assign fu_ld_idx    = IW'(ld_idx);
  assign fu_ld_x      = rf_x;
  assign fu_ld_y      = rf_y;
  assign fu_ld_bypass = ld_bypass;
  assign fu_rd_idx    = (wr_idx < LW'(NW)) ? IW'(wr_idx) : '0;
  assign rf_wdata     = (32'(wr_fu) < N_FU && wr_idx < LW'(NW)) ? fu_rd_word[wr_fu] : '0;

endmodule
