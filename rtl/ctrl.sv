// ctrl: instruction controller of the accelerator.
//
// Fetches 32-bit instructions (see ecc_pkg for the encoding) from the code
// memory and executes them. Decoding is non-blocking: every instruction
// either advances the program counter or loads it with a constant, and only
// WAIT holds the program until the named unit is no longer busy, so several
// units can compute at the same time. READ and WRITE run the register-file
// word loop of the address table: READ fetches the words x[i], y[i] of two
// elements (l = word count of the first @Rid, or of the second one when the
// first operand is bypassed) and streams them into a unit in l + 1 cycles;
// WRITE stores the l result words of a unit in l cycles. LAUNCH pulses a
// unit's start with its MODE field. CALL pushes the program counter and
// jumps, RET jumps to the popped address plus one. CMPD sets the zero flag Z
// when the current key digit equals DIGIT; TST sets Z when the named flag is
// 0; BZ / BNZ branch on Z. SET writes a flag; SET KNEXT,1 advances the key
// to its next digit. HALT stops the program and raises done.
//
// Timing: start (one cycle, while idle) begins execution at address 0; the
// code memory has one cycle of read latency, hidden by presenting the next
// program counter combinationally, so straight-line code issues one
// instruction per cycle. done stays high from HALT to the next start.
//
// The instruction list, the non-blocking decoding with WAIT as its only
// blocking instruction, CALL/RET behaviour and the address-table loop follow
// the accelerator description; the encoding, the flag numbering, the zero
// flag semantics, NOP/HALT and the call-stack depth are this design's
// choices.
module ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned N_FU    = 3,
  parameter int unsigned CAW     = 10,
  parameter int unsigned AW      = 10,
  parameter int unsigned LW      = 10,
  parameter int unsigned NREG    = 16,
  parameter int unsigned STACK   = 8,
  localparam int unsigned RW     = $clog2(NREG),
  localparam int unsigned SPW    = $clog2(STACK + 1),
  localparam int unsigned SPIW   = (STACK > 1) ? $clog2(STACK) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                running,
  output logic                done,
  // code memory
  output logic [CAW-1:0]      code_addr,
  input  logic [31:0]         code_word,
  // address table
  output logic                iat_set_off,
  output logic                iat_set_len,
  output logic [RW-1:0]       iat_set_rid,
  output logic [AW-1:0]       iat_set_off_val,
  output logic [LW-1:0]       iat_set_len_val,
  output logic [RW-1:0]       iat_a_rid,
  output logic [RW-1:0]       iat_b_rid,
  output logic [LW-1:0]       iat_idx,
  input  logic [LW-1:0]       iat_a_len,
  input  logic [LW-1:0]       iat_b_len,
  // register file port A write enable (address from the table)
  output logic                rf_we,
  // interconnect
  output logic                ld_valid,
  output logic [3:0]          ld_fu,
  output logic [LW-1:0]       ld_idx,
  output logic                ld_bypass,
  output logic                launch,
  output logic [3:0]          launch_fu,
  output logic [7:0]          launch_mode,
  output logic [3:0]          wr_fu,
  output logic [LW-1:0]       wr_idx,
  input  logic [N_FU-1:0]     fu_busy,
  // key management
  output logic                k_load,
  output logic [LW-1:0]       k_load_nw,
  output logic                k_next,
  input  logic signed [7:0]   k_digit,
  input  logic                k_done,
  // flags to units
  output logic                opmode
);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_EXEC, C_READ, C_WRITE} cstate_e;

  cstate_e        st;
  logic [CAW-1:0] pc, pc_next;
  instr_t         ir;
  logic [LW-1:0]  cnt, loop_len;
  logic           zf, user_flag;
  logic [CAW-1:0] stack [STACK];
  logic [SPW-1:0] sp;
  logic           ld_pend;
  logic [3:0]     ld_pend_fu;
  logic [LW-1:0]  ld_pend_idx;
  logic           ld_pend_byp;

  assign ir = instr_t'(code_word);

  // selected flag for TST
  logic flag_val;
  always_comb begin
    unique case (ir.fu)
      FLAG_OPMODE: flag_val = opmode;
      FLAG_KDONE:  flag_val = k_done;
      FLAG_USER:   flag_val = user_flag;
      default:     flag_val = 1'b0;
    endcase
  end

  logic fu_sel_busy;
  always_comb begin
    fu_sel_busy = 1'b0;
    for (int f = 0; f < N_FU; f++)
      if (ir.fu == 4'(f)) fu_sel_busy = fu_busy[f];
  end

  logic [LW-1:0] read_len;
  assign read_len = ir.bypass ? iat_b_len : iat_a_len;

  // next program counter and single-cycle actions
  always_comb begin
    pc_next         = pc;
    iat_set_off     = 1'b0;
    iat_set_len     = 1'b0;
    iat_set_rid     = ir.rid_a[RW-1:0];
    iat_set_off_val = AW'(ir.imm);
    iat_set_len_val = LW'(ir.imm);
    iat_a_rid       = ir.rid_a[RW-1:0];
    iat_b_rid       = ir.rid_b[RW-1:0];
    iat_idx         = cnt;
    rf_we           = 1'b0;
    launch          = 1'b0;
    launch_fu       = ir.fu;
    launch_mode     = ir.imm[7:0];
    wr_fu           = ir.fu;
    wr_idx          = cnt;
    k_load          = 1'b0;
    k_load_nw       = LW'(ir.imm);
    k_next          = 1'b0;
    unique case (st)
      C_IDLE:  pc_next = '0;
      C_FETCH: pc_next = pc;
      C_EXEC: begin
        pc_next = pc + 1'b1;
        unique case (ir.op)
          OP_READ: begin
            iat_idx = '0;
            pc_next = pc;
          end
          OP_WRITE: begin
            iat_idx = '0;
            pc_next = (iat_a_len <= LW'(1)) ? pc + 1'b1 : pc;
            rf_we   = (iat_a_len != '0);
            wr_idx  = '0;
          end
          OP_LAUNCH:   launch = 1'b1;
          OP_WAIT:     if (fu_sel_busy) pc_next = pc;
          OP_SETADDR0: iat_set_off = 1'b1;
          OP_SETADDRN: iat_set_len = 1'b1;
          OP_WRITEK:   k_load = 1'b1;
          OP_CALL, OP_JMP: pc_next = CAW'(ir.imm);
          OP_RET:      pc_next = (sp != '0) ? stack[SPIW'(sp - 1'b1)] + 1'b1 : pc + 1'b1;
          OP_BZ:       if (zf)  pc_next = CAW'(ir.imm);
          OP_BNZ:      if (!zf) pc_next = CAW'(ir.imm);
          OP_SET:      k_next = (ir.fu == FLAG_KNEXT) && ir.imm[0];
          OP_HALT:     pc_next = pc;
          default: ;
        endcase
      end
      C_READ: begin
        pc_next = (cnt >= loop_len) ? pc + 1'b1 : pc;
      end
      C_WRITE: begin
        rf_we   = 1'b1;
        pc_next = (cnt == loop_len - 1'b1) ? pc + 1'b1 : pc;
      end
      default: pc_next = pc;
    endcase
  end

  assign code_addr = pc_next;
  assign running   = (st != C_IDLE);

  // delayed load strobe: register-file data arrive one cycle after the address
  assign ld_valid  = ld_pend;
  assign ld_fu     = ld_pend_fu;
  assign ld_idx    = ld_pend_idx;
  assign ld_bypass = ld_pend_byp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; pc <= '0; cnt <= '0; loop_len <= '0; zf <= 1'b0;
      user_flag <= 1'b0; opmode <= 1'b0; sp <= '0; done <= 1'b0;
      ld_pend <= 1'b0; ld_pend_fu <= '0; ld_pend_idx <= '0; ld_pend_byp <= 1'b0;
      for (int s = 0; s < STACK; s++) stack[s] <= '0;
    end else begin
      pc      <= pc_next;
      ld_pend <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          st <= C_FETCH; done <= 1'b0; sp <= '0;
        end
        C_FETCH: st <= C_EXEC;
        C_EXEC: begin
          unique case (ir.op)
            OP_READ: begin
              loop_len    <= read_len;
              cnt         <= LW'(1);
              st          <= C_READ;
              ld_pend     <= (read_len != '0);
              ld_pend_fu  <= ir.fu;
              ld_pend_idx <= '0;
              ld_pend_byp <= ir.bypass;
            end
            OP_WRITE: begin
              loop_len <= iat_a_len;
              cnt      <= LW'(1);
              if (iat_a_len > LW'(1)) st <= C_WRITE;
            end
            OP_CALL: if (32'(sp) < STACK) begin
              stack[SPIW'(sp)] <= pc;
              sp        <= sp + 1'b1;
            end
            OP_RET:  if (sp != '0) sp <= sp - 1'b1;
            OP_CMPD: zf <= (k_digit == 8'(ir.imm[7:0]));
            OP_TST:  zf <= ~flag_val;
            OP_SET: begin
              if (ir.fu == FLAG_OPMODE) opmode    <= ir.imm[0];
              if (ir.fu == FLAG_USER)   user_flag <= ir.imm[0];
            end
            OP_HALT: begin
              st <= C_IDLE; done <= 1'b1;
            end
            default: ;
          endcase
        end
        C_READ: begin
          if (cnt < loop_len) begin
            ld_pend     <= 1'b1;
            ld_pend_idx <= cnt;
          end
          if (cnt >= loop_len) st <= C_EXEC;
          else cnt <= cnt + 1'b1;
        end
        C_WRITE: begin
          if (cnt == loop_len - 1'b1) st <= C_EXEC;
          cnt <= cnt + 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
