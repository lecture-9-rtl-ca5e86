// tb_ee183_cpu: runs programs on the processor core, with the instruction
// ROM, data RAM and switch/LED addresses modelled in the testbench, and
// compares the registers, the RAM window and the LEDs with the
// instruction-level reference model (ee183_ref_pkg).
//
// Programs: the sample program (R0 = 16 + 15 + ... + 1 = 136, with its loop
// timing checked: one instruction per clock, the jump's delay slot included),
// a straight-line hazard program whose every instruction uses the result of
// the one or two before it, and 60 random programs with both values of the
// external condition.
module tb_ee183_cpu;
  import ee183_pkg::*;
  import ee183_ref_pkg::*;

  logic   clk = 0, rst = 1, ext = 0;
  pc_t    iaddr;
  instr_t idata;
  word_t  maddr, mwd, mrd;
  logic   mwe, mre;

  instr_t prog [256];
  word_t  ram [4096];
  word_t  leds, switches;
  int checks = 0, failures = 0;
  int cycle = 0;

  ee183_cpu dut (.clk(clk), .rst(rst), .ext_cond(ext), .irom_addr(iaddr), .irom_data(idata),
                 .mem_addr(maddr), .mem_we(mwe), .mem_re(mre), .mem_wdata(mwd), .mem_rdata(mrd));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Synchronous ROM and RAM with the switch/LED word at 0xFFF.
  always @(posedge clk) begin
    idata <= prog[iaddr];
    if (mwe) begin
      if (maddr == 12'hFFF) leds <= mwd;
      else ram[maddr] <= mwd;
    end
    mrd <= (maddr == 12'hFFF) ? switches : ram[maddr];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_cpu();
    rst = 1;
    foreach (ram[i]) ram[i] = '0;
    leds = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
  endtask

  task automatic compare(ee183_ref m, string name);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dut.u_regfile.regs[i] != m.r[i]) begin
        failures++;
        $display("%s: R%0d = %h, want %h", name, i, dut.u_regfile.regs[i], m.r[i]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (ram[i] != m.mem[i]) begin
        failures++;
        $display("%s: mem[%0d] = %h, want %h", name, i, ram[i], m.mem[i]);
      end
    end
    checks++;
    if (leds != m.leds) begin failures++; $display("%s: LEDs %h, want %h", name, leds, m.leds); end
  endtask

  task automatic run_and_compare(string name, int cycles);
    ee183_ref m = new();
    m.switches = switches;
    m.ext_cond = ext;
    reset_cpu();
    repeat (cycles) @(posedge clk);
    #1;
    repeat (cycles) m.step(prog);
    compare(m, name);
  endtask

  initial begin
    int t0, t1;
    switches = 12'h5A3;

    // The sample program.
    sample_program(prog);
    reset_cpu();
    t0 = cycle;
    // R0 sees its last ADD (R1 = 1) in loop iteration 16; each iteration is
    // four instructions (ADD, DECA, JF, delay-slot NOP) at one per clock.
    for (int i = 0; i < 200 && dut.u_regfile.regs[0] != 12'd136; i++) @(posedge clk);
    t1 = cycle;
    checks++;
    // fetch at cycles 1..: ADD of iteration k at PC 2 is fetched in cycle
    // 2 + 4(k-1) + 1 and writes the register file four clocks later.
    if (t1 - t0 != 2 + 4 * 15 + 1 + 4) begin
      failures++;
      $display("sample program: R0 = 136 after %0d clocks, want %0d", t1 - t0, 2 + 4 * 15 + 5);
    end
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (dut.u_regfile.regs[0] != 12'd136 || dut.u_regfile.regs[1] != 12'd0) begin
      failures++;
      $display("sample program: R0=%0d R1=%0d", dut.u_regfile.regs[0], dut.u_regfile.regs[1]);
    end

    // Back-to-back dependences: forwarding from one and two instructions
    // back, through the register file from three back, and a loaded word
    // used at once.
    foreach (prog[i]) prog[i] = NOP;
    prog[0]  = enc_lit(3'd1, 11'd5);
    prog[1]  = enc_lit(3'd2, 11'd7);
    prog[2]  = enc_alu(OP_ADD, 3'd3, 3'd1, 3'd2);   // 12, from W and WB
    prog[3]  = enc_alu(OP_ADD, 3'd4, 3'd3, 3'd3);   // 24, from W
    prog[4]  = enc_alu(OP_SUB, 3'd5, 3'd4, 3'd3);   // 12, from W and WB
    prog[5]  = enc_alu(OP_ADD, 3'd6, 3'd3, 3'd5);   // 24, R3 through the file
    prog[6]  = enc_lit(3'd7, 11'd9);
    prog[7]  = enc_store(3'd7, 3'd6);               // mem[9] = 24
    prog[8]  = enc_load(3'd0, 3'd7);                // R0 = 24
    prog[9]  = enc_alu(OP_INCA, 3'd0, 3'd0, 3'd0);  // 25, from the load in W
    prog[10] = enc_jump(1'b1, CC_TRUE, 8'd10);
    run_and_compare("hazards", 30);
    checks++;
    if (dut.u_regfile.regs[0] != 12'd25 || ram[9] != 12'd24) begin
      failures++;
      $display("hazards: R0=%0d mem[9]=%0d", dut.u_regfile.regs[0], ram[9]);
    end

    // Random programs.
    for (int n = 0; n < 60; n++) begin
      ext = 1'(n);
      switches = word_t'($urandom);
      random_program(prog, 200);
      run_and_compare($sformatf("random %0d", n), 260);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
