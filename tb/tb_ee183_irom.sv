// tb_ee183_irom: loads random words through the load port and reads them
// back, checking the one-clock read latency; unloaded words read as NOP.
// A second ROM is initialised from tb/ee183_sample.hex (the summing loop,
// assembled) and must read back those eight words followed by NOPs.
module tb_ee183_irom;
  import ee183_pkg::*;

  logic clk = 0, lwe = 0;
  logic [7:0] addr = 0, laddr = 0;
  instr_t data, ldata = 0;
  instr_t shadow [256];
  int checks = 0, failures = 0;

  ee183_irom dut (.clk(clk), .addr(addr), .data(data),
                  .load_we(lwe), .load_addr(laddr), .load_data(ldata));

  instr_t sdata;
  ee183_irom #(.INIT_FILE("tb/ee183_sample.hex")) u_sample (
    .clk(clk), .addr(addr), .data(sdata), .load_we(1'b0), .load_addr('0), .load_data('0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = NOP;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      lwe = 1; laddr = 8'(i); ldata = instr_t'($urandom);
      shadow[i] = ldata;
    end
    @(negedge clk) lwe = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) addr = 8'(i);
      @(posedge clk) #1;
      checks++;
      if (data != shadow[i]) begin failures++; $display("addr %0d: %h want %h", i, data, shadow[i]); end
    end
    // The ROM initialised from the hex file.
    begin
      instr_t want [8] = '{16'h4400, 16'h8810, 16'h4001, 16'h4988, 16'h0702, 16'h0000, 16'h1006, 16'h0000};
      for (int i = 0; i < 12; i++) begin
        @(negedge clk) addr = 8'(i);
        @(posedge clk) #1;
        checks++;
        if (sdata != (i < 8 ? want[i] : NOP)) begin
          failures++; $display("init file word %0d: %h", i, sdata);
        end
      end
    end
    // Latency: the output changes only at the edge.
    @(negedge clk) addr = 8'd3;
    @(posedge clk) #1;
    addr = 8'd4; #1;
    checks++;
    if (data != shadow[3]) begin failures++; $display("read is not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
