// ee183_fwd: the forwarding unit (FWD) of the EE183 processor.
//
// An instruction in E may need a register that one of the two instructions
// ahead of it has computed but not yet written to the register file. For each
// source operand this unit picks where the E-stage operand multiplexer takes
// its value from: the instruction just ahead (now in W; its result is the
// output of the W-stage multiplexer, ALU result or loaded data), the one two
// ahead (now in the write-back register), or the value read from the register
// file in R. The nearest writer wins. The lecture names the unit and the
// first case (destination of instruction n-1 equals a source of
// instruction n); the second case and the priority follow from the pipeline
// drawing, where the register file is written from a register after W.
// Combinational.
module ee183_fwd
  import ee183_pkg::*;
(
  input  reg_t  e_ra,
  input  reg_t  e_rb,
  input  logic  w_we,
  input  reg_t  w_wc,
  input  logic  wb_we,
  input  reg_t  wb_wc,
  output logic [1:0] sel_a,  // 0: register file, 1: W stage, 2: write-back register
  output logic [1:0] sel_b
);

  function automatic logic [1:0] pick(reg_t r);
    if (w_we && w_wc == r)        return 2'd1;
    else if (wb_we && wb_wc == r) return 2'd2;
    else                          return 2'd0;
  endfunction

  assign sel_a = pick(e_ra);
  assign sel_b = pick(e_rb);

endmodule
