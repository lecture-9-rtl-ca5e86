// fractal_pipe: one iteration of the Mandelbrot/Julia recurrence as a fixed
// five-stage pipeline (the lab-2 datapath that motivates the processor).
//
// For a point (xn, yn) and a constant c it computes
//   x(n+1) = xn^2 - yn^2 + cx,   y(n+1) = 2 xn yn + cy,
//   escape = xn^2 + yn^2 > 4.
// Stages 1-3: three 3-stage multipliers form xn*xn, xn*yn and yn*yn, while a
// multiplexer picks c: the pixel coordinate (mandel_x, mandel_y) in Mandelbrot
// mode, or the fixed constant (julia_x, julia_y) in Julia mode; c rides along
// in the pipeline registers. Stage 4: xx - yy, 2*xy (shift left by one) and
// xx + yy. Stage 5: the two additions of c and the compare against 4.
// A new point can enter every clock; results appear five clocks later with
// out_valid. The stage structure, the three multipliers, the shift, the
// multiplexers and the compare follow the lecture's drawing; the word format
// (signed fixed point, W bits of which FRAC are fraction) and the valid bit
// are this design's choices. Intermediate squares are kept at full precision;
// x(n+1) and y(n+1) are truncated to W bits (they may wrap once the point has
// escaped, which the escape flag reports).
module fractal_pipe #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic                julia,      // 0: Mandelbrot, 1: Julia
  input  logic signed [W-1:0] xn,
  input  logic signed [W-1:0] yn,
  input  logic signed [W-1:0] mandel_x,
  input  logic signed [W-1:0] mandel_y,
  input  logic signed [W-1:0] julia_x,
  input  logic signed [W-1:0] julia_y,
  output logic                out_valid,
  output logic signed [W-1:0] x_next,
  output logic signed [W-1:0] y_next,
  output logic signed [W-1:0] cx_out,     // the c used, for the next iteration
  output logic signed [W-1:0] cy_out,
  output logic                escape
);

  localparam int unsigned MSTAGES = 3;
  localparam int unsigned PW      = 2 * W;      // product width
  localparam int unsigned SW      = PW + 2;     // sums of products

  logic signed [PW-1:0] xx, xy, yy;
  logic signed [W-1:0]  cx_pipe [MSTAGES];
  logic signed [W-1:0]  cy_pipe [MSTAGES];
  logic [MSTAGES-1:0]   v_pipe;

  pipe_mult #(.W(W), .STAGES(MSTAGES)) u_mxx (.clk(clk), .a(xn), .b(xn), .p(xx));
  pipe_mult #(.W(W), .STAGES(MSTAGES)) u_mxy (.clk(clk), .a(xn), .b(yn), .p(xy));
  pipe_mult #(.W(W), .STAGES(MSTAGES)) u_myy (.clk(clk), .a(yn), .b(yn), .p(yy));

  // Stages 1-3: the c multiplexers and their pipeline registers.
  always_ff @(posedge clk) begin
    cx_pipe[0] <= julia ? julia_x : mandel_x;
    cy_pipe[0] <= julia ? julia_y : mandel_y;
    for (int i = 1; i < int'(MSTAGES); i++) begin
      cx_pipe[i] <= cx_pipe[i-1];
      cy_pipe[i] <= cy_pipe[i-1];
    end
    if (rst) v_pipe <= '0;
    else     v_pipe <= {v_pipe[MSTAGES-2:0], in_valid};
  end

  // Stage 4: difference, doubling and sum of the products.
  logic signed [SW-1:0] diff_q, dbl_q, sum_q;
  logic signed [W-1:0]  cx4_q, cy4_q;
  logic                 v4_q;

  always_ff @(posedge clk) begin
    diff_q <= SW'(xx) - SW'(yy);
    dbl_q  <= SW'(xy) <<< 1;
    sum_q  <= SW'(xx) + SW'(yy);
    cx4_q  <= cx_pipe[MSTAGES-1];
    cy4_q  <= cy_pipe[MSTAGES-1];
    if (rst) v4_q <= 1'b0;
    else     v4_q <= v_pipe[MSTAGES-1];
  end

  // Stage 5: add c back in (products carry 2*FRAC fraction bits) and test
  // the magnitude against 4.
  localparam logic signed [SW-1:0] FOUR = SW'(4) <<< (2 * FRAC);

  logic signed [SW-1:0] diff_s, dbl_s;
  logic signed [W-1:0]  xs, ys;
  assign diff_s = diff_q >>> FRAC;
  assign dbl_s  = dbl_q >>> FRAC;
  assign xs     = diff_s[W-1:0] + cx4_q;
  assign ys     = dbl_s[W-1:0] + cy4_q;

  always_ff @(posedge clk) begin
    x_next <= xs;
    y_next <= ys;
    cx_out <= cx4_q;
    cy_out <= cy4_q;
    escape <= sum_q > FOUR;
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v4_q;
  end

endmodule
