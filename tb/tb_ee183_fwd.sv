// tb_ee183_fwd: all combinations of sources and writers; the nearest writer
// (the instruction in W) must win over the write-back register.
module tb_ee183_fwd;
  import ee183_pkg::*;

  reg_t ra, rb, wwc, bwc;
  logic wwe, bwe;
  logic [1:0] sa, sb;
  int checks = 0, failures = 0;

  ee183_fwd dut (.e_ra(ra), .e_rb(rb), .w_we(wwe), .w_wc(wwc), .wb_we(bwe), .wb_wc(bwc),
                 .sel_a(sa), .sel_b(sb));

  function automatic logic [1:0] want(reg_t r);
    if (wwe && wwc == r) return 1;
    if (bwe && bwc == r) return 2;
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16384; i++) begin
      {ra, rb, wwc, bwc, wwe, bwe} = 14'(i);
      #1;
      checks++;
      if (sa != want(ra) || sb != want(rb)) begin
        failures++;
        $display("ra=%0d rb=%0d w=%0d/%0d wb=%0d/%0d -> %0d %0d", ra, rb, wwe, wwc, bwe, bwc, sa, sb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
