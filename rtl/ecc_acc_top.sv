// ecc_acc_top: programmable accelerator for elliptic (ECC) and hyperelliptic
// (HECC) curve cryptography over prime fields.
//
// A small controller executes a program from the code memory. The program
// moves multi-word field elements, w bits per cycle, between a dual-port
// register file and a set of field functional units (one Fp adder/subtracter,
// one Fp inverter and N_MUL Montgomery multipliers with NB w-bit sub-blocks
// each), launches the units, which then compute in parallel, and waits for
// their results. Field elements are named through an address table that maps
// an entry @Rid to (first word, word count) and drives the word loop. The
// scalar k of a scalar multiplication [k]P stays inside the key unit, which
// recodes it on the fly (binary or width-lambda NAF) and lets the program
// branch on each digit. A basic host bus downloads code, key, modulus and
// operands, starts the program and reads results back.
//
// Unit numbering for programs: 0 = add/sub, 1 = inverter, 2 .. 1 + N_MUL =
// multipliers, then (HAS_F2M = 1) the binary-field unit at 2 + N_MUL, whose
// LAUNCH MODE bit 1 selects inversion and bit 0 multiplication (else
// addition); it takes the reduction polynomial from the same modulus
// register as the prime-field units.
// With CODE_WRITABLE = 0 the code memory is a ROM holding CODE_INIT_FILE
// (a $readmemh file of 32-bit instructions) and host code writes are
// ignored.
// The field size is set at run time by the word counts in the address table
// (up to NW words); the modulus and pinv = -p^-1 mod 2^W are written by the
// host before a run.
//
// Block structure (controller, code memory, key management, register file,
// interconnect, functional units), the w-bit data paths and the default
// configuration (w = 32, one adder/subtracter, one inverter, one multiplier
// with one sub-block, 256-bit field, 4-NAF recoding) follow the accelerator
// description; leaving the optional F2m unit out by default is this design's
// choice, since the evaluated configurations are prime-field ones. See each
// block for its own choices.
module ecc_acc_top
  import ecc_pkg::*;
#(
  parameter int unsigned W        = 32,
  parameter int unsigned NW       = 8,
  parameter int unsigned N_MUL    = 1,
  parameter int unsigned NB       = 1,
  parameter int unsigned RF_DEPTH = 1024,
  parameter int unsigned CODE_DEPTH = 1024,
  parameter int unsigned NREG     = 16,
  parameter bit          HAS_F2M  = 1'b0,
  parameter bit          CODE_WRITABLE  = 1'b1,
  parameter string       CODE_INIT_FILE = "",
  localparam int unsigned N_FU    = 2 + N_MUL + (HAS_F2M ? 1 : 0),
  localparam int unsigned AW      = $clog2(RF_DEPTH),
  localparam int unsigned CAW     = $clog2(CODE_DEPTH),
  localparam int unsigned LW      = 10,
  localparam int unsigned IW      = $clog2(NW + 1),
  localparam int unsigned KIW     = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  h_addr,
  input  logic         h_we,
  input  logic         h_re,
  input  logic [W-1:0] h_wdata,
  output logic [W-1:0] h_rdata,
  output logic         h_rvalid,
  output logic         busy,
  output logic         done
);

  // host interface
  logic                 start, running;
  logic                 code_we;
  logic [CAW-1:0]       code_waddr, code_addr;
  logic [31:0]          code_wdata, code_word;
  logic                 kw_en;
  logic [KIW-1:0]       kw_idx;
  logic [W-1:0]         kw_data;
  logic                 h_rf_we;
  logic [AW-1:0]        h_rf_addr;
  logic [W-1:0]         h_rf_wdata;
  logic [NW-1:0][W-1:0] modulus;
  logic [W-1:0]         pinv;
  logic [2:0]           lambda;
  // register file
  logic [AW-1:0]        rf_a_addr, rf_b_addr, iat_a_phys, iat_b_phys;
  logic                 rf_a_we, c_rf_we;
  logic [W-1:0]         rf_a_wdata, rf_a_rdata, rf_b_rdata, ic_rf_wdata;
  // address table
  logic                 iat_set_off, iat_set_len;
  logic [$clog2(NREG)-1:0] iat_set_rid, iat_a_rid, iat_b_rid;
  logic [AW-1:0]        iat_set_off_val;
  logic [LW-1:0]        iat_set_len_val, iat_idx, iat_a_len, iat_b_len;
  // controller to interconnect
  logic                 ld_valid, ld_bypass, launch;
  logic [3:0]           ld_fu, launch_fu, wr_fu;
  logic [LW-1:0]        ld_idx, wr_idx;
  logic [7:0]           launch_mode;
  logic                 opmode;
  // key
  logic                 k_load, k_next, k_done;
  logic [LW-1:0]        k_load_nw;
  logic signed [7:0]    k_digit;
  // units
  logic [N_FU-1:0]      fu_ld_en, fu_start, fu_busy;
  logic [IW-1:0]        fu_ld_idx, fu_rd_idx;
  logic [W-1:0]         fu_ld_x, fu_ld_y;
  logic                 fu_ld_bypass;
  logic [N_FU-1:0][W-1:0] fu_rd_word;

  assign busy = running;

  host_if #(.W(W), .NW(NW), .CAW(CAW), .AW(AW)) u_host (
    .clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata, .h_rdata, .h_rvalid,
    .start, .running, .done,
    .code_we, .code_waddr, .code_wdata,
    .kw_en, .kw_idx, .kw_data,
    .rf_we(h_rf_we), .rf_addr(h_rf_addr), .rf_wdata(h_rf_wdata),
    .rf_rdata(rf_a_rdata),
    .modulus, .pinv, .lambda
  );

  code_mem #(.DEPTH(CODE_DEPTH), .WRITABLE(CODE_WRITABLE), .INIT_FILE(CODE_INIT_FILE)) u_code (
    .clk, .we(code_we), .waddr(code_waddr), .wdata(code_wdata),
    .rd_addr(code_addr), .instr(code_word)
  );

  ctrl #(.N_FU(N_FU), .CAW(CAW), .AW(AW), .LW(LW), .NREG(NREG)) u_ctrl (
    .clk, .rst_n, .start, .running, .done,
    .code_addr, .code_word,
    .iat_set_off, .iat_set_len, .iat_set_rid, .iat_set_off_val, .iat_set_len_val,
    .iat_a_rid, .iat_b_rid, .iat_idx, .iat_a_len, .iat_b_len,
    .rf_we(c_rf_we),
    .ld_valid, .ld_fu, .ld_idx, .ld_bypass, .launch, .launch_fu, .launch_mode,
    .wr_fu, .wr_idx, .fu_busy,
    .k_load, .k_load_nw, .k_next, .k_digit, .k_done,
    .opmode
  );

  addr_table #(.NREG(NREG), .AW(AW), .LW(LW)) u_iat (
    .clk, .rst_n,
    .set_off(iat_set_off), .set_len(iat_set_len), .set_rid(iat_set_rid),
    .set_value_off(iat_set_off_val), .set_value_len(iat_set_len_val),
    .a_rid(iat_a_rid), .a_idx(iat_idx), .a_phys(iat_a_phys), .a_len(iat_a_len),
    .b_rid(iat_b_rid), .b_idx(iat_idx), .b_phys(iat_b_phys), .b_len(iat_b_len)
  );

  // port A belongs to the host while no program runs
  assign rf_a_addr  = running ? iat_a_phys : h_rf_addr;
  assign rf_a_we    = running ? c_rf_we    : h_rf_we;
  assign rf_a_wdata = running ? ic_rf_wdata : h_rf_wdata;
  assign rf_b_addr  = iat_b_phys;

  reg_file #(.W(W), .DEPTH(RF_DEPTH)) u_rf (
    .clk, .a_addr(rf_a_addr), .a_we(rf_a_we), .a_wdata(rf_a_wdata), .a_rdata(rf_a_rdata),
    .b_addr(rf_b_addr), .b_rdata(rf_b_rdata)
  );

  key_mgmt #(.W(W), .NW(NW)) u_key (
    .clk, .rst_n, .kw_en, .kw_idx, .kw_data, .lambda,
    .load(k_load), .load_nw(IW'(k_load_nw)), .next(k_next),
    .digit(k_digit), .done(k_done)
  );

  fu_interconnect #(.W(W), .NW(NW), .N_FU(N_FU), .LW(LW)) u_ic (
    .ld_valid, .ld_fu, .ld_idx, .ld_bypass, .rf_x(rf_a_rdata), .rf_y(rf_b_rdata),
    .fu_ld_en, .fu_ld_idx, .fu_ld_x, .fu_ld_y, .fu_ld_bypass,
    .launch, .launch_fu, .fu_start,
    .wr_fu, .wr_idx, .fu_rd_idx, .fu_rd_word, .rf_wdata(ic_rf_wdata)
  );

  fu_addsub #(.W(W), .NW(NW)) u_addsub (
    .clk, .rst_n, .ld_en(fu_ld_en[0]), .ld_idx(fu_ld_idx), .ld_x(fu_ld_x), .ld_y(fu_ld_y),
    .ld_bypass(fu_ld_bypass), .start(fu_start[0]), .sub(opmode | launch_mode[0]), .modulus,
    .busy(fu_busy[0]), .rd_idx(fu_rd_idx), .rd_word(fu_rd_word[0])
  );

  fu_inv #(.W(W), .NW(NW)) u_inv (
    .clk, .rst_n, .ld_en(fu_ld_en[1]), .ld_idx(fu_ld_idx), .ld_x(fu_ld_x), .ld_y(fu_ld_y),
    .ld_bypass(fu_ld_bypass), .start(fu_start[1]), .modulus,
    .busy(fu_busy[1]), .rd_idx(fu_rd_idx), .rd_word(fu_rd_word[1])
  );

  for (genvar g = 0; g < N_MUL; g++) begin : g_mul
    fu_mont_mul #(.W(W), .NW(NW), .NB(NB)) u_mul (
      .clk, .rst_n, .ld_en(fu_ld_en[2+g]), .ld_idx(fu_ld_idx), .ld_x(fu_ld_x), .ld_y(fu_ld_y),
      .ld_bypass(fu_ld_bypass), .start(fu_start[2+g]), .modulus, .pinv,
      .busy(fu_busy[2+g]), .rd_idx(fu_rd_idx), .rd_word(fu_rd_word[2+g])
    );
  end

  if (HAS_F2M) begin : g_f2m
    fu_f2m #(.W(W), .NW(NW)) u_f2m (
      .clk, .rst_n, .ld_en(fu_ld_en[N_FU-1]), .ld_idx(fu_ld_idx), .ld_x(fu_ld_x), .ld_y(fu_ld_y),
      .ld_bypass(fu_ld_bypass), .start(fu_start[N_FU-1]), .mode(launch_mode[1:0]), .modulus,
      .busy(fu_busy[N_FU-1]), .rd_idx(fu_rd_idx), .rd_word(fu_rd_word[N_FU-1])
    );
  end

endmodule
