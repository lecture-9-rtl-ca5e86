// tb_ee183_dram: random writes and reads over the full 4096-word RAM against
// a shadow copy, with the read data arriving one clock after the address.
module tb_ee183_dram;
  import ee183_pkg::*;

  logic clk = 0, we = 0;
  logic [11:0] addr = 0;
  word_t wd = 0, rd;
  word_t shadow [4096];
  logic  known [4096];
  int checks = 0, failures = 0;

  ee183_dram dut (.clk(clk), .addr(addr), .we(we), .wdata(wd), .rdata(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (known[i]) known[i] = 0;
    repeat (20000) begin
      logic [11:0] a;
      @(negedge clk);
      a = 12'($urandom_range(0, 63)) | (($urandom_range(0, 3) == 0) ? 12'($urandom) : 12'd0);
      addr = a;
      we = 1'($urandom);
      wd = word_t'($urandom);
      @(posedge clk); #1;
      if (!we && known[a]) begin
        checks++;
        if (rd != shadow[a]) begin failures++; $display("addr %h: %h want %h", a, rd, shadow[a]); end
      end
      if (we) begin shadow[a] = wd; known[a] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
