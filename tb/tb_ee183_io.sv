// tb_ee183_io: the address decode of the memory map: LED writes, switch and
// timer reads one clock after the address, RAM reads passed through, and no
// RAM write for an I/O address.
module tb_ee183_io;
  import ee183_pkg::*;

  logic clk = 0, rst = 1, we = 0, re = 0, ram_we;
  word_t addr = 0, wd = 0, rd, ram_rd = 0, sw = 0, tmr = 0, leds;
  int checks = 0, failures = 0;

  ee183_io dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .re(re), .wdata(wd), .rdata(rd),
                .ram_we(ram_we), .ram_rdata(ram_rd), .switches(sw), .timer(tmr), .leds(leds));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_true(leds == 0, "LEDs reset");
    repeat (500) begin
      word_t a, v, s, t, r;
      logic  w;
      case ($urandom_range(0, 3))
        0: a = 12'hFFF; 1: a = 12'hFFE; default: a = word_t'($urandom_range(0, 12'hFFD));
      endcase
      w = 1'($urandom); v = word_t'($urandom); s = word_t'($urandom);
      t = word_t'($urandom); r = word_t'($urandom);
      @(negedge clk);
      addr = a; we = w; re = !w; wd = v; sw = s; tmr = t;
      #1;
      expect_true(ram_we == (w && a < 12'hFFE), "RAM write enable decode");
      @(posedge clk); #1;
      we = 0; re = 0; ram_rd = r; sw = ~s; tmr = ~t;  // later changes must not leak in
      #1;
      if (w) begin
        if (a == 12'hFFF) expect_true(leds == v, "LED write");
      end else begin
        if (a == 12'hFFF)      expect_true(rd == s, "switch read");
        else if (a == 12'hFFE) expect_true(rd == t, "timer read");
        else                   expect_true(rd == r, "RAM read passes through");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
