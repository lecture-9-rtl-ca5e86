// lecture9_top: the two designs of this collection side by side.
//
//  * ee183_system: the EE183 12-bit pipelined RISC microcontroller with its
//    instruction ROM, data RAM, DIP switches, LEDs and free-running timer.
//  * fractal_pipe: the fixed Mandelbrot/Julia iteration pipeline whose
//    control problems motivate the programmable processor.
//
// The two share only the clock and reset; each brings its own ports out with
// a prefix (cpu_, frac_). Parameters pass straight to the two designs and
// default to their sizes: a 256-word instruction ROM, 4096-word data RAM and
// 16-bit fixed-point fractal words with 12 fraction bits.
module lecture9_top
  import ee183_pkg::*;
#(
  parameter int unsigned IROM_DEPTH = 256,
  parameter int unsigned DRAM_DEPTH = 4096,
  parameter int unsigned FRAC_W     = 16,
  parameter int unsigned FRAC_FRAC  = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  // processor
  input  logic                     cpu_ext_cond,
  input  word_t                    cpu_switches,
  output word_t                    cpu_leds,
  input  logic                     cpu_prog_we,
  input  pc_t                      cpu_prog_addr,
  input  instr_t                   cpu_prog_data,
  // fractal pipeline
  input  logic                     frac_in_valid,
  input  logic                     frac_julia,
  input  logic signed [FRAC_W-1:0] frac_xn,
  input  logic signed [FRAC_W-1:0] frac_yn,
  input  logic signed [FRAC_W-1:0] frac_mandel_x,
  input  logic signed [FRAC_W-1:0] frac_mandel_y,
  input  logic signed [FRAC_W-1:0] frac_julia_x,
  input  logic signed [FRAC_W-1:0] frac_julia_y,
  output logic                     frac_out_valid,
  output logic signed [FRAC_W-1:0] frac_x_next,
  output logic signed [FRAC_W-1:0] frac_y_next,
  output logic signed [FRAC_W-1:0] frac_cx_out,
  output logic signed [FRAC_W-1:0] frac_cy_out,
  output logic                     frac_escape
);

  ee183_system #(
    .IROM_DEPTH (IROM_DEPTH),
    .DRAM_DEPTH (DRAM_DEPTH)
  ) u_system (
    .clk       (clk),
    .rst       (rst),
    .ext_cond  (cpu_ext_cond),
    .switches  (cpu_switches),
    .leds      (cpu_leds),
    .prog_we   (cpu_prog_we),
    .prog_addr (cpu_prog_addr),
    .prog_data (cpu_prog_data)
  );

  fractal_pipe #(
    .W    (FRAC_W),
    .FRAC (FRAC_FRAC)
  ) u_fractal (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (frac_in_valid),
    .julia     (frac_julia),
    .xn        (frac_xn),
    .yn        (frac_yn),
    .mandel_x  (frac_mandel_x),
    .mandel_y  (frac_mandel_y),
    .julia_x   (frac_julia_x),
    .julia_y   (frac_julia_y),
    .out_valid (frac_out_valid),
    .x_next    (frac_x_next),
    .y_next    (frac_y_next),
    .cx_out    (frac_cx_out),
    .cy_out    (frac_cy_out),
    .escape    (frac_escape)
  );

endmodule
