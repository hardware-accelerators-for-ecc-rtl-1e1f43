// ecc_pkg: shared definitions of the (H)ECC accelerator.
//
// The instruction set (READ, WRITE, LAUNCH, WAIT, SETADDR0, SETADDRN, WRITEK,
// CALL, RET, BZ, BNZ, JMP, CMPD, SET, TST) and its operand kinds follow the
// accelerator's published instruction list. The binary encoding, the NOP and
// HALT opcodes, the flag numbering and the functional-unit numbering are this
// design's own choices.
//
// Instruction word (32 bits):
//   [31:27] opcode
//   [26:23] fu   : functional-unit id (READ, WRITE, LAUNCH, WAIT) or flag id (SET, TST)
//   [22:19] rid_a: address-table entry @Rid (READ first operand, WRITE, SETADDR0/N)
//   [18:15] rid_b: address-table entry of the second READ operand
//   [14]    bypass: READ only; 1 = first operand comes from the unit's own last result
//   [13:0]  imm  : OFFSET, #WORD, @DEST, LAUNCH MODE, CMPD DIGIT (signed) or SET value
package ecc_pkg;

  typedef enum logic [4:0] {
    OP_NOP      = 5'd0,
    OP_READ     = 5'd1,
    OP_WRITE    = 5'd2,
    OP_LAUNCH   = 5'd3,
    OP_WAIT     = 5'd4,
    OP_SETADDR0 = 5'd5,
    OP_SETADDRN = 5'd6,
    OP_WRITEK   = 5'd7,
    OP_CALL     = 5'd8,
    OP_RET      = 5'd9,
    OP_BZ       = 5'd10,
    OP_BNZ      = 5'd11,
    OP_JMP      = 5'd12,
    OP_CMPD     = 5'd13,
    OP_SET      = 5'd14,
    OP_TST      = 5'd15,
    OP_HALT     = 5'd16
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  fu;
    logic [3:0]  rid_a;
    logic [3:0]  rid_b;
    logic        bypass;
    logic [13:0] imm;
  } instr_t;

  // Flag identifiers for SET / TST.
  localparam logic [3:0] FLAG_OPMODE = 4'd0; // add/sub unit: 0 = addition, 1 = subtraction
  localparam logic [3:0] FLAG_KNEXT  = 4'd1; // SET KNEXT,1 advances the key to its next digit
  localparam logic [3:0] FLAG_KDONE  = 4'd2; // read only: every digit of k has been consumed
  localparam logic [3:0] FLAG_USER   = 4'd3; // general-purpose flag for programs

  // Functional-unit identifiers: multipliers follow the two fixed units.
  localparam logic [3:0] FU_ADDSUB = 4'd0;
  localparam logic [3:0] FU_INV    = 4'd1;
  localparam logic [3:0] FU_MUL0   = 4'd2;

  // Host interface register map (word addresses on the basic host port).
  localparam logic [3:0] HREG_CTRL    = 4'd0; // write bit0 = start program at address 0
  localparam logic [3:0] HREG_STATUS  = 4'd1; // read {busy, done}
  localparam logic [3:0] HREG_CODE    = 4'd2; // code download window
  localparam logic [3:0] HREG_KEY     = 4'd3; // key word window
  localparam logic [3:0] HREG_RF      = 4'd4; // register-file word window
  localparam logic [3:0] HREG_MOD     = 4'd5; // modulus word window
  localparam logic [3:0] HREG_PINV    = 4'd6; // -p^-1 mod 2^w
  localparam logic [3:0] HREG_LAMBDA  = 4'd7; // key recoding window width (1 = binary)

  function automatic instr_t mk(opcode_e op, logic [3:0] fu = '0, logic [3:0] ra = '0,
                                logic [3:0] rb = '0, logic byp = 1'b0, logic [13:0] imm = '0);
    instr_t i;
    i.op = op; i.fu = fu; i.rid_a = ra; i.rid_b = rb; i.bypass = byp; i.imm = imm;
    return i;
  endfunction

endpackage
