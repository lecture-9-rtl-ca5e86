// tb_ee183_timer: the counter is zero after reset, counts one per clock and
// wraps from 0xFFF to 0.
module tb_ee183_timer;
  import ee183_pkg::*;

  logic clk = 0, rst = 1;
  word_t count;
  int checks = 0, failures = 0;

  ee183_timer dut (.clk(clk), .rst(rst), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++; if (count != 0) failures++;
    rst = 0;
    for (int i = 1; i <= 5000; i++) begin
      @(posedge clk); #1;
      checks++;
      if (count != word_t'(i)) begin failures++; $display("cycle %0d: %0d", i, count); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
