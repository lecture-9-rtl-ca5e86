// tb_lecture9_top: end-to-end test of both designs in the top, at the top's
// default sizes.
//
// Processor: the directed I/O program with both values of the external
// condition (hand-worked results), the sample summing loop with its cycle
// count, and 10 random programs against the instruction-level model.
// Monitors count every pipeline mechanism as it happens: forwarding from W
// and from the write-back register, a loaded word forwarded at once, the
// register-file write-through, taken and not-taken jumps, the condition-code
// bypass and the condition-code register, the external-condition jump,
// switch, LED, timer and RAM accesses. A mechanism that never happened is a
// failure.
//
// Fractal pipeline: computes escape counts for a row of Mandelbrot pixels and
// a row of Julia pixels, five pixels in flight at a time so that every
// output is fed straight back as the next input. The counts are compared
// with a fixed-point model of the recurrence, and the pipeline must accept a
// point on every clock while pixels remain (full utilization).
module tb_lecture9_top;
  import ee183_pkg::*;
  import ee183_ref_pkg::*;

  localparam int FW = 16, MAXIT = 32, NPIX = 40, INFLIGHT = 5;

  logic   clk = 0, rst = 1, ext = 0, pwe = 0;
  word_t  sw = 0, leds;
  pc_t    paddr = 0;
  instr_t pdata = 0;
  instr_t prog [256];

  logic fiv = 0, fjulia = 0, fov, fesc;
  logic signed [FW-1:0] fxn = 0, fyn = 0, fmx = 0, fmy = 0, fjx = 0, fjy = 0;
  logic signed [FW-1:0] fxo, fyo, fcxo, fcyo;

  int checks = 0, failures = 0, cycle = 0;

  lecture9_top dut (
    .clk(clk), .rst(rst),
    .cpu_ext_cond(ext), .cpu_switches(sw), .cpu_leds(leds),
    .cpu_prog_we(pwe), .cpu_prog_addr(paddr), .cpu_prog_data(pdata),
    .frac_in_valid(fiv), .frac_julia(fjulia), .frac_xn(fxn), .frac_yn(fyn),
    .frac_mandel_x(fmx), .frac_mandel_y(fmy), .frac_julia_x(fjx), .frac_julia_y(fjy),
    .frac_out_valid(fov), .frac_x_next(fxo), .frac_y_next(fyo),
    .frac_cx_out(fcxo), .frac_cy_out(fcyo), .frac_escape(fesc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: %0h, want %0h", what, got, want); end
  endtask

  // ---------------- mechanism monitors (processor) ----------------
  typedef enum int {
    M_FWD_W, M_FWD_WB, M_FWD_LOAD, M_RF_BYPASS, M_JUMP_TAKEN, M_JUMP_NOT_TAKEN,
    M_CC_BYPASS, M_CC_REG, M_EXT_JUMP, M_SW_READ, M_LED_WRITE, M_TIMER_READ,
    M_RAM_STORE, M_RAM_LOAD, M_MANDEL, M_JULIA, M_ESCAPE, M_FULL_PIPE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"forward from W", "forward from write-back", "forward loaded word",
    "register-file write-through", "jump taken", "jump not taken", "condition-code bypass",
    "condition-code register", "external-condition jump", "switch read", "LED write",
    "timer read", "RAM store", "RAM load", "Mandelbrot point", "Julia point", "escape",
    "pipeline full"};

  always @(posedge clk) if (!rst) begin
    automatic ctrl_t  e  = dut.u_system.u_cpu.e_ctrl_q;
    automatic instr_t ir = dut.u_system.u_cpu.ir;
    automatic ctrl_t  r  = dut.u_system.u_cpu.r_ctrl;
    automatic logic [1:0] sa = dut.u_system.u_cpu.sel_a, sb = dut.u_system.u_cpu.sel_b;
    automatic logic ua = e.is_alu || e.is_load || e.is_store, ub = e.is_alu || e.is_store;
    automatic word_t addr = dut.u_system.u_cpu.mem_addr;
    automatic logic is_jump = (ir[15:14] == 2'b00) && ir != NOP;
    if ((ua && sa == 1) || (ub && sb == 1)) mech[M_FWD_W]++;
    if ((ua && sa == 2) || (ub && sb == 2)) mech[M_FWD_WB]++;
    if (dut.u_system.u_cpu.w_load_q && ((ua && sa == 1) || (ub && sb == 1))) mech[M_FWD_LOAD]++;
    if (dut.u_system.u_cpu.u_regfile.we && (r.is_alu || r.is_store) &&
        (dut.u_system.u_cpu.u_regfile.wa == r.ra || dut.u_system.u_cpu.u_regfile.wa == r.rb))
      mech[M_RF_BYPASS]++;
    if (dut.u_system.u_cpu.r_jump) mech[M_JUMP_TAKEN]++;
    if (is_jump && !dut.u_system.u_cpu.r_jump) mech[M_JUMP_NOT_TAKEN]++;
    if (is_jump && ir[11:8] != 0 && e.is_alu) mech[M_CC_BYPASS]++;
    if (is_jump && ir[11:8] != 0 && ir[11:8] != 4 && !e.is_alu) mech[M_CC_REG]++;
    if (dut.u_system.u_cpu.r_jump && ir[11:8] == 4) mech[M_EXT_JUMP]++;
    if (e.is_load && addr == 12'hFFF) mech[M_SW_READ]++;
    if (e.is_store && addr == 12'hFFF) mech[M_LED_WRITE]++;
    if (e.is_load && addr == 12'hFFE) mech[M_TIMER_READ]++;
    if (e.is_store && addr < 12'hFFE) mech[M_RAM_STORE]++;
    if (e.is_load && addr < 12'hFFE) mech[M_RAM_LOAD]++;
  end

  // ---------------- processor ----------------
  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      pwe = 1; paddr = pc_t'(i); pdata = prog[i];
    end
    @(negedge clk) pwe = 0;
    for (int i = 0; i < 16; i++) dut.u_system.u_dram.mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  function automatic word_t rf(int i);
    return dut.u_system.u_cpu.u_regfile.regs[i];
  endfunction

  task automatic run_cpu();
    word_t s;
    int t0;
    for (int k = 0; k < 2; k++) begin
      s = word_t'($urandom);
      ext = 1'(k);
      sw = s;
      io_program(prog);
      load_and_reset();
      repeat (150) @(posedge clk);
      #1;
      expect_eq(rf(0), 136, "R0");
      expect_eq(rf(2), 3, "timer difference");
      expect_eq(leds, 12'(s + 136), "LEDs");
      expect_eq(rf(4), ext ? 12'(s + 136) : 0, "R4");
      expect_eq(rf(5), 1, "R5 (delay slot)");
      expect_eq(dut.u_system.u_dram.mem[5], 12'(s + 136), "RAM[5]");
    end
    // Sample loop: 16 iterations of four instructions at one per clock.
    sample_program(prog);
    load_and_reset();
    t0 = cycle;
    for (int i = 0; i < 200 && dut.u_system.u_cpu.u_regfile.regs[0] != 12'd136; i++) @(posedge clk);
    expect_eq(cycle - t0, 2 + 4 * 15 + 5, "clocks to finish the sample loop");
    for (int n = 0; n < 10; n++) begin
      ee183_ref m;
      m = new();
      ext = 1'(n);
      sw = word_t'($urandom);
      m.ext_cond = ext;
      m.switches = sw;
      random_program(prog, 200);
      load_and_reset();
      repeat (260) @(posedge clk);
      #1;
      repeat (260) m.step(prog);
      for (int i = 0; i < 8; i++) expect_eq(rf(i), m.r[i], $sformatf("random %0d R%0d", n, i));
      for (int i = 0; i < 16; i++)
        expect_eq(dut.u_system.u_dram.mem[i], m.mem[i], $sformatf("random %0d RAM[%0d]", n, i));
      expect_eq(leds, m.leds, $sformatf("random %0d LEDs", n));
    end
  endtask

  // ---------------- fractal pipeline ----------------
  // Fixed-point model: Q3.12 words, products kept whole, shifted back by 12
  // and wrapped to 16 bits; escape when x^2 + y^2 > 4.
  function automatic int model_count(logic signed [FW-1:0] x0, logic signed [FW-1:0] y0,
                                     logic signed [FW-1:0] cx, logic signed [FW-1:0] cy);
    logic signed [FW-1:0] x = x0, y = y0;
    for (int it = 0; it < MAXIT; it++) begin
      longint xx = longint'(x) * longint'(x), yy = longint'(y) * longint'(y);
      longint xy = longint'(x) * longint'(y);
      if (xx + yy > (longint'(4) << 24)) return it;
      x = FW'(((xx - yy) >>> 12) + longint'(cx));
      y = FW'(((2 * xy) >>> 12) + longint'(cy));
    end
    return MAXIT;
  endfunction

  typedef struct {
    int id;
    int iter;
    logic signed [FW-1:0] x, y;
  } slot_t;

  task automatic run_fractal(logic julia_mode);
    logic signed [FW-1:0] px [NPIX], py [NPIX];
    int   got [NPIX];
    int   next_pix = 0, done = 0, busy = 0, cycles = 0;
    slot_t inflight [$];
    logic signed [FW-1:0] jcx = -FW'(1638), jcy = FW'(2458);  // c = -0.4 + 0.6i
    for (int i = 0; i < NPIX; i++) begin
      px[i] = FW'(-8192 + i * 3 * 4096 / NPIX);                        // -2.0 .. 1.0
      py[i] = julia_mode ? FW'(-4096 + i * 2 * 4096 / NPIX) : FW'(1229);  // 0.3
      got[i] = -1;
    end
    fjulia = julia_mode;
    fjx = jcx;
    fjy = jcy;
    while (done < NPIX) begin
      slot_t s;
      logic have = 0;
      @(negedge clk);
      // An output this clock is an iteration finished: retire or feed back.
      if (fov) begin
        s = inflight.pop_front();
        if (fesc || s.iter + 1 == MAXIT + 1) begin
          got[s.id] = fesc ? s.iter : MAXIT;
          done++;
          if (fesc) mech[M_ESCAPE]++;
        end else begin
          s.iter++;
          s.x = fxo;
          s.y = fyo;
          have = 1;
        end
      end
      if (!have && next_pix < NPIX && inflight.size() < INFLIGHT) begin
        s.id = next_pix;
        s.iter = 0;
        s.x = julia_mode ? px[next_pix] : FW'(0);
        s.y = julia_mode ? py[next_pix] : FW'(0);
        next_pix++;
        have = 1;
      end
      fiv = have;
      if (have) begin
        fxn = s.x;
        fyn = s.y;
        fmx = px[s.id];
        fmy = py[s.id];
        inflight.push_back(s);
        if (julia_mode) mech[M_JULIA]++; else mech[M_MANDEL]++;
      end
      if (next_pix >= INFLIGHT && next_pix < NPIX) begin
        cycles++;
        if (have) busy++;
      end
    end
    @(negedge clk) fiv = 0;
    for (int i = 0; i < NPIX; i++) begin
      int want = julia_mode ? model_count(px[i], py[i], jcx, jcy)
                            : model_count(0, 0, px[i], py[i]);
      expect_eq(got[i], want, $sformatf("%s pixel %0d escape count", julia_mode ? "julia" : "mandelbrot", i));
    end
    checks++;
    if (busy != cycles) begin
      failures++;
      $display("pipeline idle %0d of %0d clocks while pixels were waiting", cycles - busy, cycles);
    end else if (cycles > 0) mech[M_FULL_PIPE]++;
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(posedge clk);
    // One after the other: the processor tests pulse the shared reset.
    run_cpu();
    run_fractal(1'b0);
    run_fractal(1'b1);
    for (int i = 0; i < int'(M_COUNT); i++) begin
      checks++;
      $display("%-28s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin failures++; $display("mechanism never happened: %s", mech_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
