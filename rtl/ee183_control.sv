// ee183_control: the R-stage controller (CNTRL) of the EE183 processor.
//
// Decodes the instruction word held in the I/R pipeline register into the
// control bundle that then travels down the pipe beside the operands, and
// decides jumps. The lecture's idea is that the control is encoded with the
// data, so that every later stage acts only on fields it is handed.
//
// Jumps are decided here, in R, one stage after fetch, so the instruction
// fetched behind a jump (the delay slot) always executes, as the lecture
// says. A jump is taken when the selected condition equals the sense bit
// (JT: jump if the condition is true; JF: if it is false). The flags given
// must be those of the most recent ALU instruction, including one that is in
// E at this moment: the pipeline selects them. Combinational.
module ee183_control
  import ee183_pkg::*;
(
  input  instr_t ir,
  input  flags_t flags,
  input  logic   ext_cond,
  output ctrl_t  ctrl,
  output logic   jump,
  output pc_t    target
);

  iclass_e cls;
  logic    cond;

  assign cls    = iclass_e'(ir[15:14]);
  assign target = ir[PCW-1:0];

  always_comb begin
    unique case (ir[11:8])
      CC_TRUE:    cond = 1'b1;
      CC_NEG:     cond = flags.n;
      CC_ZERO:    cond = flags.z;
      CC_CARRY:   cond = flags.c;
      CC_EXT:     cond = ext_cond;
      CC_NEGZERO: cond = flags.n | flags.z;
      default:    cond = 1'b0;
    endcase
    jump = (cls == CLS_JUMP) && (cond == ir[12]);
  end

  always_comb begin
    ctrl     = CTRL_NOP;
    ctrl.wc  = ir[13:11];
    ctrl.ra  = ir[5:3];
    ctrl.rb  = ir[2:0];
    ctrl.op  = aluop_e'(ir[10:6]);
    ctrl.imm = {{(DW-11){ir[10]}}, ir[10:0]};
    unique case (cls)
      CLS_ALU: begin
        ctrl.we     = 1'b1;
        ctrl.is_alu = 1'b1;
      end
      CLS_LIT: begin
        ctrl.we     = 1'b1;
        ctrl.is_lit = 1'b1;
      end
      CLS_MEM: begin
        if (ir[10]) begin
          ctrl.is_store = 1'b1;
        end else begin
          ctrl.is_load = 1'b1;
          ctrl.we      = 1'b1;
        end
      end
      default: ;  // jump: no register write, no E-stage work
    endcase
  end

endmodule
