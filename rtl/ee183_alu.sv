// ee183_alu: the E-stage arithmetic and boolean unit of the EE183 processor.
//
// Purely combinational. Opcodes 0..11 are arithmetic and shift operations on
// 12-bit words; opcodes 16..31 are the sixteen two-input boolean functions,
// where the low four opcode bits are the truth table: result bit i is
// op[{a[i], b[i]}]. Opcodes 12..15 give zero. That there are 28 ALU
// instructions with three operands, and that ADD is op 0, DECA op 6 and ZEROS
// op 16, follows the lecture; which arithmetic operations fill the other
// opcodes is this design's choice.
//
// Condition codes: n is bit 11 of the result, z is set when the result is
// zero, c is the carry out of the 12-bit adder (for A - B it is the
// "no borrow" bit, set when A >= B unsigned); shifts put the bit shifted out in
// c and boolean ops clear it.
module ee183_alu
  import ee183_pkg::*;
(
  input  aluop_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y,
  output flags_t flags
);

  logic [DW:0] sum;  // carry in bit DW
  logic [3:0]  tt;   // truth table of a boolean op

  assign tt = op[3:0];

  always_comb begin
    sum = '0;
    y   = '0;
    flags.c = 1'b0;
    if (op[4]) begin
      for (int i = 0; i < int'(DW); i++) y[i] = tt[{a[i], b[i]}];
    end else begin
      unique case (op)
        OP_ADD:    sum = {1'b0, a} + {1'b0, b};
        OP_ADDINC: sum = {1'b0, a} + {1'b0, b} + 1'b1;
        OP_SUB:    sum = {1'b0, a} + {1'b0, ~b} + 1'b1;
        OP_SUBDEC: sum = {1'b0, a} + {1'b0, ~b};
        OP_INCA:   sum = {1'b0, a} + 1'b1;
        OP_NEGA:   sum = {1'b0, ~a} + 1'b1;
        OP_DECA:   sum = {1'b0, a} + {1'b0, {DW{1'b1}}};
        OP_SHL:    sum = {a, 1'b0};
        OP_SHR:    sum = {a[0], 1'b0, a[DW-1:1]};
        OP_ASR:    sum = {a[0], a[DW-1], a[DW-1:1]};
        OP_ROL:    sum = {a[DW-1], a[DW-2:0], a[DW-1]};
        OP_ROR:    sum = {a[0], a[0], a[DW-1:1]};
        default:   sum = '0;
      endcase
      y       = sum[DW-1:0];
      flags.c = sum[DW];
    end
    flags.n = y[DW-1];
    flags.z = (y == '0);
  end

endmodule
