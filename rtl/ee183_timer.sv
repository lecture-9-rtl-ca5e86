// ee183_timer: the free-running timer of the EE183 system.
//
// A 12-bit counter that counts up by one on every clock from reset and wraps
// around; programs read it through the memory map to measure time. The lecture
// names a free-running timer (counter); the width, the rate of one count per
// clock and the reset to zero are this design's choices.
module ee183_timer
  import ee183_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  output word_t count
);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
