// tb_fractal_pipe: streams points through the fractal iteration pipeline,
// one per clock with gaps, in both modes, and checks every result five
// clocks after its point went in: x(n+1), y(n+1) against a real-number
// model of the recurrence (within rounding of the fixed-point format), the
// escape flag against |z|^2 > 4, and the constant that was selected.
module tb_fractal_pipe;
  localparam int W = 16, FRAC = 12, LAT = 5;
  localparam real SCALE = 4096.0;

  logic clk = 0, rst = 1, iv = 0, julia = 0;
  logic signed [W-1:0] xn = 0, yn = 0, mx = 0, my = 0, jx = 0, jy = 0;
  logic ov, esc;
  logic signed [W-1:0] xo, yo, cxo, cyo;
  int checks = 0, failures = 0, cycle = 0;
  int n_mandel = 0, n_julia = 0, n_escape = 0, n_inside = 0;

  typedef struct {
    int  t;
    real x, y, cx, cy;
    logic signed [W-1:0] cxi, cyi;
  } pt_t;
  pt_t q [$];

  fractal_pipe #(.W(W), .FRAC(FRAC)) dut (
    .clk(clk), .rst(rst), .in_valid(iv), .julia(julia), .xn(xn), .yn(yn),
    .mandel_x(mx), .mandel_y(my), .julia_x(jx), .julia_y(jy),
    .out_valid(ov), .x_next(xo), .y_next(yo), .cx_out(cxo), .cy_out(cyo), .escape(esc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] rnd(real lo, real hi);
    real v = lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
    return W'($rtoi(v * SCALE));
  endfunction

  // Check outputs as they appear.
  always @(posedge clk) if (!rst) begin
    #1;
    if (ov) begin
      pt_t p;
      real ex, ey, mag;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("result with no point in flight");
      end else begin
        p   = q.pop_front();
        ex  = p.x * p.x - p.y * p.y + p.cx;
        ey  = 2.0 * p.x * p.y + p.cy;
        mag = p.x * p.x + p.y * p.y;
        if (cycle - p.t != LAT) begin
          failures++; $display("latency %0d, want %0d", cycle - p.t, LAT);
        end
        if (cxo != p.cxi || cyo != p.cyi) begin
          failures++; $display("wrong constant selected");
        end
        if (mag > 4.01 || mag < 3.99) begin
          if (esc != (mag > 4.0)) begin
            failures++; $display("escape %0d for |z|^2 = %f", esc, mag);
          end
        end
        if (esc) n_escape++; else n_inside++;
        if (ex > -7.9 && ex < 7.9 && ey > -7.9 && ey < 7.9) begin
          real gx, gy;
          gx = real'(xo) / SCALE;
          gy = real'(yo) / SCALE;
          if (gx - ex > 0.002 || ex - gx > 0.002 || gy - ey > 0.002 || ey - gy > 0.002) begin
            failures++;
            $display("x=%f y=%f c=(%f,%f): got (%f,%f) want (%f,%f)", p.x, p.y, p.cx, p.cy, gx, gy, ex, ey);
          end
        end
      end
    end else if (q.size() > 0 && cycle - q[0].t > LAT) begin
      failures++; $display("missing result"); void'(q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      iv    = ($urandom_range(0, 4) != 0);
      julia = 1'($urandom);
      xn = rnd(-2.0, 2.0); yn = rnd(-2.0, 2.0);
      mx = rnd(-2.0, 1.0); my = rnd(-1.5, 1.5);
      jx = rnd(-1.0, 1.0); jy = rnd(-1.0, 1.0);
      if (iv) begin
        pt_t p;
        p.t  = cycle;  // presented in this clock, taken in at its end
        p.x  = real'(xn) / SCALE; p.y = real'(yn) / SCALE;
        p.cxi = julia ? jx : mx; p.cyi = julia ? jy : my;
        p.cx = real'(p.cxi) / SCALE; p.cy = real'(p.cyi) / SCALE;
        q.push_back(p);
        if (julia) n_julia++; else n_mandel++;
      end
    end
    @(negedge clk) iv = 0;
    repeat (LAT + 3) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results never came out", q.size()); end
    checks++;
    if (n_mandel == 0 || n_julia == 0 || n_escape == 0 || n_inside == 0) begin
      failures++; $display("a case never happened");
    end
    $display("mandelbrot %0d julia %0d escaped %0d inside %0d", n_mandel, n_julia, n_escape, n_inside);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
