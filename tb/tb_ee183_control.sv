// tb_ee183_control: decodes the words of the sample assembler listing and
// random words against the field layout, and checks the jump decision for
// every condition, sense and flag combination.
module tb_ee183_control;
  import ee183_pkg::*;

  instr_t ir;
  flags_t fl;
  logic   ext, jump;
  ctrl_t  c;
  pc_t    tgt;
  int checks = 0, failures = 0;

  ee183_control dut (.ir(ir), .flags(fl), .ext_cond(ext), .ctrl(c), .jump(jump), .target(tgt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (ir=%h)", what, ir); end
  endtask

  initial begin
    // Words printed in the sample listing.
    fl = '0; ext = 0;
    ir = 16'h4400; #1;  // ZEROS R0
    expect_true(c.is_alu && c.we && c.wc == 0 && c.op == OP_ZEROS && !jump, "ZEROS R0");
    ir = 16'h8810; #1;  // LOADLIT R1, 16
    expect_true(c.is_lit && c.we && c.wc == 1 && c.imm == 12'd16 && !c.is_alu, "LOADLIT R1,16");
    ir = 16'h4001; #1;  // ADD R0, R0, R1
    expect_true(c.is_alu && c.wc == 0 && c.ra == 0 && c.rb == 1 && c.op == OP_ADD, "ADD");
    ir = 16'h4988; #1;  // DECA R1, R1
    expect_true(c.is_alu && c.wc == 1 && c.ra == 1 && c.op == OP_DECA, "DECA");
    ir = 16'h0702; fl = '{n:0, z:0, c:0}; #1;  // JF.NEGZERO 02, positive -> taken
    expect_true(jump && tgt == 8'h02 && !c.we, "JF.NEGZERO taken");
    fl = '{n:0, z:1, c:0}; #1;
    expect_true(!jump, "JF.NEGZERO not taken on zero");
    ir = 16'h1005; #1;  // JT.TRUE 05
    expect_true(jump && tgt == 8'h05, "JT.TRUE");
    ir = 16'h0000; #1;  // NOP
    expect_true(!jump && !c.we && !c.is_store && !c.is_alu, "NOP");
    ir = enc_lit(3'd5, 11'h7FF); #1;
    expect_true(c.imm == 12'hFFF, "literal sign extension");
    ir = enc_store(3'd2, 3'd3); #1;
    expect_true(c.is_store && !c.we && c.ra == 2 && c.rb == 3, "STORE");
    ir = enc_load(3'd4, 3'd2); #1;
    expect_true(c.is_load && c.we && c.wc == 4 && c.ra == 2, "LOAD");
    // Jump decisions, exhaustively.
    for (int cc = 0; cc < 8; cc++) for (int s = 0; s < 2; s++) for (int fv = 0; fv < 16; fv++) begin
      logic want;
      fl  = flags_t'(fv[2:0]);
      ext = fv[3];
      ir  = {2'b00, 1'b0, 1'(s), 4'(cc), 8'($urandom)};
      #1;
      case (cc)
        0: want = 1; 1: want = fl.n; 2: want = fl.z; 3: want = fl.c;
        4: want = ext; 7: want = fl.n | fl.z; default: want = 0;
      endcase
      expect_true(jump == (want == 1'(s)) && tgt == ir[7:0] && !c.we, "jump decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
