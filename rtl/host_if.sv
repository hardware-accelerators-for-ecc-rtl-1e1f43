// host_if: basic host interface of the accelerator.
//
// A simple synchronous word bus, W bits wide and clocked with the
// accelerator (no clock-rate or width adaptation). The 16-bit address
// h_addr = {region[3:0], offset[11:0]} selects one of the regions listed in
// ecc_pkg (HREG_*): the control register (write bit 0 = start), the status
// register ({running, done}), the code-download window, the key window, the
// register file, the modulus words, pinv = -p^-1 mod 2^W and the key-recoding
// window width lambda. Code and key words travel on their own private paths
// to the code memory and the key unit; the key is write-only. Register-file
// accesses are honoured only while no program runs. A read (h_re) returns its
// data on h_rdata in the next cycle, flagged by h_rvalid.
//
// The existence of a basic interface without rate or width adaptation and the
// private code and key paths follow the accelerator description; the address
// map, the register set and the one-cycle read timing are this design's
// choices. W must be at least 32 so that one bus word holds an instruction.
module host_if
  import ecc_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned NW    = 8,
  parameter int unsigned CAW   = 10,
  parameter int unsigned AW    = 10,
  localparam int unsigned KIW  = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host bus
  input  logic [15:0]          h_addr,
  input  logic                 h_we,
  input  logic                 h_re,
  input  logic [W-1:0]         h_wdata,
  output logic [W-1:0]         h_rdata,
  output logic                 h_rvalid,
  // controller
  output logic                 start,
  input  logic                 running,
  input  logic                 done,
  // code download path
  output logic                 code_we,
  output logic [CAW-1:0]       code_waddr,
  output logic [31:0]          code_wdata,
  // key download path
  output logic                 kw_en,
  output logic [KIW-1:0]       kw_idx,
  output logic [W-1:0]         kw_data,
  // register-file access while idle
  output logic                 rf_we,
  output logic [AW-1:0]        rf_addr,
  output logic [W-1:0]         rf_wdata,
  input  logic [W-1:0]         rf_rdata,
  // configuration
  output logic [NW-1:0][W-1:0] modulus,
  output logic [W-1:0]         pinv,
  output logic [2:0]           lambda
);

  logic [3:0]  region, rd_region;
  logic [11:0] offset;
  logic [W-1:0] rd_reg;

  assign region = h_addr[15:12];
  assign offset = h_addr[11:0];

  assign start      = h_we && region == HREG_CTRL && h_wdata[0] && !running;
  assign code_we    = h_we && region == HREG_CODE;
  assign code_waddr = CAW'(offset);
  assign code_wdata = h_wdata[31:0];
  assign kw_en      = h_we && region == HREG_KEY && 32'(offset) < NW;
  assign kw_idx     = KIW'(offset);
  assign kw_data    = h_wdata;
  assign rf_we      = h_we && region == HREG_RF && !running;
  assign rf_addr    = AW'(offset);
  assign rf_wdata   = h_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      modulus   <= '0;
      pinv      <= '0;
      lambda    <= 3'd4;
      h_rvalid  <= 1'b0;
      rd_region <= '0;
      rd_reg    <= '0;
    end else begin
      if (h_we && region == HREG_MOD && 32'(offset) < NW) modulus[KIW'(offset)] <= h_wdata;
      if (h_we && region == HREG_PINV)   pinv   <= h_wdata;
      if (h_we && region == HREG_LAMBDA) lambda <= h_wdata[2:0];
      h_rvalid  <= h_re;
      rd_region <= region;
      unique case (region)
        HREG_STATUS: rd_reg <= W'({running, done});
        HREG_MOD:    rd_reg <= (32'(offset) < NW) ? modulus[KIW'(offset)] : '0;
        HREG_PINV:   rd_reg <= pinv;
        HREG_LAMBDA: rd_reg <= W'(lambda);
        default:     rd_reg <= '0;
      endcase
    end
  end

  assign h_rdata = (rd_region == HREG_RF) ? rf_rdata : rd_reg;

  initial assert (W >= 32) else $error("host_if: W must be at least 32");

endmodule
