// ee183_irom: instruction storage (IROM) of the EE183 processor.
//
// DEPTH words of 16 bits, read synchronously: the word at addr appears on
// data after the next rising edge, so the ROM's output register is the I/R
// pipeline register. Contents come from INIT_FILE (hex, one word per line)
// when it is given, and can also be written through the load port, which
// stands in for loading a new program into the FPGA's block RAM. The
// synchronous read, the 256-word depth (the 8-bit target field of a jump) and
// the load port are this design's choices; the lecture only names the block.
module ee183_irom
  import ee183_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output instr_t                   data,
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,
  input  instr_t                   load_data
);

  instr_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = NOP;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    data <= mem[addr];
  end

endmodule
