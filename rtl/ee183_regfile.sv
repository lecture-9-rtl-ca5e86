// ee183_regfile: the eight 12-bit general-purpose registers of the EE183
// processor.
//
// Two combinational read ports (A and B, read in the R stage) and one write
// port, written on the rising clock edge from the write-back register at the
// end of the pipe. All eight registers are general purpose; R0 is not tied to
// zero (the sample program clears it with ZEROS R0).
//
// Write-through: a read of the register being written in the same cycle
// returns the new value. Without it an instruction three places behind a
// writer would read a stale value, since the E-stage forwarding reaches back
// only two instructions. The bypass and the reset of all registers to zero are
// this design's choices.
module ee183_regfile
  import ee183_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  reg_t  ra_addr,
  output word_t ra_data,
  input  reg_t  rb_addr,
  output word_t rb_data,
  input  logic  we,
  input  reg_t  wa,
  input  word_t wd
);

  word_t regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign ra_data = (we && wa == ra_addr) ? wd : regs[ra_addr];
  assign rb_data = (we && wa == rb_addr) ? wd : regs[rb_addr];

endmodule
