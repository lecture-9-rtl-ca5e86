// ee183_dram: the data memory (DRAM in the pipeline drawing, SRAM on the
// system drawing) of the EE183 processor.
//
// DEPTH words of 12 bits with one port. The address and write data are
// presented in the E stage; a write happens at the rising edge ending E, and
// read data appear after that edge, i.e. during W, where the W-stage
// multiplexer selects them. Word addressing with the 12-bit register as the
// address (register-indirect). The synchronous read and the depth of 4096
// words (all that a 12-bit address reaches) are this design's choices.
module ee183_dram
  import ee183_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  word_t                    wdata,
  output word_t                    rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
