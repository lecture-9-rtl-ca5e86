// ee183_pkg: types, constants and instruction encoders shared by the EE183
// 12-bit RISC microcontroller.
//
// The machine has a 12-bit data path, eight general-purpose registers and a
// 16-bit instruction word. Bits [15:14] pick one of four instruction classes:
//
//   00  control transfer  [12] sense (1 = jump if true, 0 = jump if false)
//                         [11:8] condition, [7:0] target address
//   01  ALU               [13:11] WC  [10:6] OP  [5:3] RA  [2:0] RB
//   10  LOADLIT           [13:11] WC  [10:0] literal, sign-extended to 12 bits
//   11  memory            [13:11] WC  [10] 1 = STORE, 0 = LOAD
//                         [5:3] RA holds the address, [2:0] RB the store data
//
// The ALU layout and the class of ALU, jump and literal words follow the
// printed instruction format and the words of the sample assembler listing
// (ADD = op 0, DECA = op 6, ZEROS = op 16, JT.TRUE, JF.NEGZERO = condition 7,
// NOP = 0x0000). ALU op 16..31 is one of the 16 two-input boolean functions,
// its low four bits being the truth table. The remaining opcode numbers,
// the condition numbers other than TRUE and NEGZERO and the memory-word
// layout are this design's own choices.
//
// NOP is JF.TRUE (all zeros): it never jumps and writes nothing, so clearing a
// pipeline register to zero turns its instruction into a bubble.
package ee183_pkg;

  localparam int unsigned DW   = 12;  // data word
  localparam int unsigned IW   = 16;  // instruction word
  localparam int unsigned NREG = 8;   // general-purpose registers
  localparam int unsigned RW   = 3;   // register index
  localparam int unsigned PCW  = 8;   // instruction address (jump target field)

  typedef logic [DW-1:0]  word_t;
  typedef logic [IW-1:0]  instr_t;
  typedef logic [RW-1:0]  reg_t;
  typedef logic [PCW-1:0] pc_t;

  typedef enum logic [1:0] {
    CLS_JUMP = 2'b00,
    CLS_ALU  = 2'b01,
    CLS_LIT  = 2'b10,
    CLS_MEM  = 2'b11
  } iclass_e;

  // ALU opcodes. 0..11 arithmetic/shift, 12..15 unused, 16..31 boolean.
  typedef enum logic [4:0] {
    OP_ADD    = 5'd0,   // A + B
    OP_ADDINC = 5'd1,   // A + B + 1
    OP_SUB    = 5'd2,   // A - B
    OP_SUBDEC = 5'd3,   // A - B - 1
    OP_INCA   = 5'd4,   // A + 1
    OP_NEGA   = 5'd5,   // 0 - A
    OP_DECA   = 5'd6,   // A - 1
    OP_SHL    = 5'd7,   // A << 1
    OP_SHR    = 5'd8,   // A >> 1, logical
    OP_ASR    = 5'd9,   // A >> 1, arithmetic
    OP_ROL    = 5'd10,  // rotate A left by one
    OP_ROR    = 5'd11,  // rotate A right by one
    OP_ZEROS  = 5'd16,  // boolean, truth table 0000
    OP_NOR    = 5'd17,
    OP_XOR    = 5'd22,
    OP_NAND   = 5'd23,
    OP_AND    = 5'd24,
    OP_XNOR   = 5'd25,
    OP_PASSB  = 5'd26,
    OP_PASSA  = 5'd28,
    OP_OR     = 5'd30,
    OP_ONES   = 5'd31
  } aluop_e;

  // Boolean op: result bit = OP[{a_bit, b_bit}] for OP in 16..31.

  // Jump conditions (field [11:8]).
  typedef enum logic [3:0] {
    CC_TRUE    = 4'd0,
    CC_NEG     = 4'd1,
    CC_ZERO    = 4'd2,
    CC_CARRY   = 4'd3,
    CC_EXT     = 4'd4,  // the external condition input
    CC_NEGZERO = 4'd7   // negative or zero
  } cond_e;

  typedef struct packed {
    logic n;  // result bit 11
    logic z;  // result is zero
    logic c;  // carry out of an arithmetic op
  } flags_t;

  // Decoded instruction: the control that travels down the pipe with the data.
  typedef struct packed {
    logic   we;       // writes register WC
    reg_t   wc;
    reg_t   ra;
    reg_t   rb;
    logic   is_alu;   // ALU op, sets condition codes
    logic   is_lit;   // LOADLIT
    logic   is_load;
    logic   is_store;
    aluop_e op;
    word_t  imm;      // sign-extended literal
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

  // Instruction encoders (used by test programs; synthesizable).
  function automatic instr_t enc_alu(aluop_e op, reg_t wc, reg_t ra, reg_t rb);
    return {2'b01, wc, op, ra, rb};
  endfunction

  function automatic instr_t enc_lit(reg_t wc, logic [10:0] lit);
    return {2'b10, wc, lit};
  endfunction

  function automatic instr_t enc_load(reg_t wc, reg_t ra);
    return {2'b11, wc, 1'b0, 4'd0, ra, 3'd0};
  endfunction

  function automatic instr_t enc_store(reg_t ra, reg_t rb);
    return {2'b11, 3'd0, 1'b1, 4'd0, ra, rb};
  endfunction

  function automatic instr_t enc_jump(logic sense, cond_e c, pc_t target);
    return {2'b00, 1'b0, sense, c, target};
  endfunction

  localparam instr_t NOP = 16'h0000;

endpackage
