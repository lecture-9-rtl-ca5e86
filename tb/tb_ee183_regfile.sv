// tb_ee183_regfile: random writes and reads of the eight registers against a
// shadow copy, the reset to zero, and the same-cycle write-through.
module tb_ee183_regfile;
  import ee183_pkg::*;

  logic clk = 0, rst = 1, we = 0;
  reg_t ra = 0, rb = 0, wa = 0;
  word_t wd = 0, da, db;
  word_t shadow [8];
  int checks = 0, failures = 0;

  ee183_regfile dut (.clk(clk), .rst(rst), .ra_addr(ra), .ra_data(da),
                     .rb_addr(rb), .rb_data(db), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      ra = reg_t'(i); #1; checks++;
      if (da != 0) begin failures++; $display("R%0d not reset", i); end
    end
    repeat (2000) begin
      we = 1'($urandom); wa = reg_t'($urandom); wd = word_t'($urandom);
      ra = reg_t'($urandom); rb = reg_t'($urandom);
      #1;
      checks++;
      if (da != ((we && wa == ra) ? wd : shadow[ra]) ||
          db != ((we && wa == rb) ? wd : shadow[rb])) begin
        failures++;
        $display("read mismatch ra=%0d rb=%0d", ra, rb);
      end
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
