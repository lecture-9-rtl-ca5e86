// tb_ee183_system: the whole microcontroller, programmed through its ROM
// load port. Runs the directed I/O program (switches, LEDs, timer, RAM,
// external condition) with hand-worked results for both values of the
// external condition, then 20 random programs compared with the
// instruction-level reference model.
module tb_ee183_system;
  import ee183_pkg::*;
  import ee183_ref_pkg::*;

  logic   clk = 0, rst = 1, ext = 0, pwe = 0;
  word_t  sw = 0, leds;
  pc_t    paddr = 0;
  instr_t pdata = 0;
  instr_t prog [256];
  int checks = 0, failures = 0;

  ee183_system dut (.clk(clk), .rst(rst), .ext_cond(ext), .switches(sw), .leds(leds),
                    .prog_we(pwe), .prog_addr(paddr), .prog_data(pdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      pwe = 1; paddr = pc_t'(i); pdata = prog[i];
    end
    @(negedge clk) pwe = 0;
    for (int i = 0; i < 16; i++) dut.u_dram.mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  function automatic word_t rf(int i);
    return dut.u_cpu.u_regfile.regs[i];
  endfunction

  task automatic expect_eq(word_t got, word_t want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: %h, want %h", what, got, want); end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      word_t s;
      s = word_t'($urandom);
      ext = 1'(k);
      sw  = s;
      io_program(prog);
      load_and_reset();
      repeat (150) @(posedge clk);
      #1;
      expect_eq(rf(0), 12'd136, "R0");
      expect_eq(rf(2), 12'd3, "timer difference");
      expect_eq(rf(3), s + 12'd136, "R3");
      expect_eq(leds, s + 12'd136, "LEDs");
      expect_eq(rf(4), ext ? s + 12'd136 : 12'd0, "R4");
      expect_eq(rf(5), 12'd1, "R5");
      expect_eq(rf(6), 12'hFFE, "R6");
      expect_eq(rf(7), 12'hFFF, "R7");
      expect_eq(dut.u_dram.mem[5], s + 12'd136, "RAM[5]");
    end
    for (int n = 0; n < 20; n++) begin
      ee183_ref m;
      m = new();
      ext = 1'(n);
      sw  = word_t'($urandom);
      m.ext_cond = ext;
      m.switches = sw;
      random_program(prog, 200);
      load_and_reset();
      repeat (260) @(posedge clk);
      #1;
      repeat (260) m.step(prog);
      for (int i = 0; i < 8; i++) expect_eq(rf(i), m.r[i], $sformatf("random %0d R%0d", n, i));
      for (int i = 0; i < 16; i++) expect_eq(dut.u_dram.mem[i], m.mem[i], $sformatf("random %0d RAM[%0d]", n, i));
      expect_eq(leds, m.leds, $sformatf("random %0d LEDs", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
