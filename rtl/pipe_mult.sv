// pipe_mult: a signed multiplier with STAGES pipeline registers, used by the
// fractal iteration datapath.
//
// The full 2W-bit product of a and b appears on p STAGES clocks after the
// operands were presented; a new pair can enter every clock. The product is
// formed in the first stage and carried through the remaining registers, so a
// synthesis tool may retime the multiplier across them. The number of stages
// (three) is the lecture's; how the work is split among them is left to the
// tool.
module pipe_mult #(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 3
) (
  input  logic                  clk,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic signed [2*W-1:0] pipe [STAGES];

  always_ff @(posedge clk) begin
    pipe[0] <= a * b;
    for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
  end

  assign p = pipe[STAGES-1];

endmodule
