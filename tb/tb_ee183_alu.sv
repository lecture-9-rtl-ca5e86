// tb_ee183_alu: checks every ALU opcode on random and corner operands against
// an arithmetic model written from the opcode list (ee183_ref_pkg), including
// the condition codes, and the sample listing's ADD, DECA and ZEROS.
module tb_ee183_alu;
  import ee183_pkg::*;
  import ee183_ref_pkg::*;

  aluop_e op;
  word_t  a, b, y, ey;
  flags_t f, ef;
  int checks = 0, failures = 0;

  ee183_alu dut (.op(op), .a(a), .b(b), .y(y), .flags(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(aluop_e o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    ee183_ref::alu(o, x, z, ey, ef);
    checks++;
    if (y !== ey || f !== ef) begin
      failures++;
      $display("op %0d a=%h b=%h: got %h/%b, want %h/%b", o, x, z, y, f, ey, ef);
    end
  endtask

  initial begin
    word_t corners [6] = '{12'h000, 12'h001, 12'h7FF, 12'h800, 12'hFFF, 12'hAAA};
    for (int o = 0; o < 32; o++) begin
      if (o >= 12 && o < 16) continue;
      foreach (corners[i]) foreach (corners[j]) check_one(aluop_e'(o), corners[i], corners[j]);
      repeat (200) check_one(aluop_e'(o), word_t'($urandom), word_t'($urandom));
    end
    // Hand-worked values.
    op = OP_ADD;   a = 12'd100; b = 12'd36; #1; checks++; if (y != 12'd136) failures++;
    op = OP_DECA;  a = 12'd1;   b = 12'd0;  #1; checks++; if (y != 12'd0 || !f.z || f.n) failures++;
    op = OP_DECA;  a = 12'd0;              #1; checks++; if (y != 12'hFFF || !f.n) failures++;
    op = OP_ZEROS; a = 12'hFFF; b = 12'hFFF; #1; checks++; if (y != 0 || !f.z) failures++;
    op = OP_AND;   a = 12'hF0F; b = 12'h0FF; #1; checks++; if (y != 12'h00F) failures++;
    op = OP_XOR;   a = 12'hF0F; b = 12'h0FF; #1; checks++; if (y != 12'hFF0) failures++;
    op = OP_SUB;   a = 12'd5;   b = 12'd7;   #1; checks++; if (y != 12'hFFE || f.c || !f.n) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
