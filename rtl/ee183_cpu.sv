// ee183_cpu: the EE183 12-bit RISC processor core, a four-stage pipeline.
//
//   I  fetch: the PC addresses the instruction ROM, whose synchronous output
//      is the I/R pipeline register.
//   R  the controller decodes the word and decides jumps; operands A and B are
//      read from the register file. Decoded control and operands are latched
//      into the R/E register together, so control travels with the data.
//   E  the forwarding multiplexers choose each operand (register file, the
//      instruction in W, or the one in the write-back register); the ALU
//      computes and sets the condition codes; loads and stores present their
//      address (register A) and store data (register B) to the data bus.
//   W  a multiplexer picks the ALU result or the data read from memory and
//      latches it into the write-back register, which writes register WC of
//      the register file in the following cycle.
//
// One instruction enters per clock and nothing stalls: a result can be used
// by the very next instruction, a loaded word included, through forwarding.
// A jump is decided in R, so the one instruction after it (the delay slot)
// always executes; programs put a NOP there when they have nothing useful.
// The condition codes a jump tests are those of the last ALU instruction
// before it, taken straight from the ALU when that instruction is in E.
//
// Following the lecture: the 12-bit data path, eight registers, 16-bit
// instructions with three register operands, the I/R/E/W stages, forwarding
// from the previous instruction and the executed slot after a jump. This
// design's own choices: the forwarding from two instructions back, the
// condition-code bypass, the synchronous memories and the bus signals.
//
// Bus timing: mem_addr/mem_wdata/mem_we are valid in the E cycle; for a load
// mem_rdata must hold the addressed word in the next cycle.
// Synchronous active-high reset clears the pipeline to NOPs and the PC to 0.
// An assertion flags a program that puts a jump in a taken jump's delay slot.
module ee183_cpu
  import ee183_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ext_cond,
  // instruction ROM
  output pc_t    irom_addr,
  input  instr_t irom_data,
  // data bus
  output word_t  mem_addr,
  output logic   mem_we,
  output logic   mem_re,
  output word_t  mem_wdata,
  input  word_t  mem_rdata
);

  // ---------------- I stage ----------------
  pc_t  pc_q;
  logic fetch_valid_q;  // the ROM output holds a word fetched after reset

  // ---------------- R stage ----------------
  instr_t ir;
  ctrl_t  r_ctrl;
  logic   r_jump;
  pc_t    r_target;
  word_t  rf_a, rf_b;
  flags_t flags_eff;

  // ---------------- E stage ----------------
  ctrl_t  e_ctrl_q;
  word_t  e_a_q, e_b_q;
  logic [1:0] sel_a, sel_b;
  word_t  opa, opb, alu_y, e_result;
  flags_t alu_flags, cc_q;

  // ---------------- W stage ----------------
  logic   w_we_q, w_load_q;
  reg_t   w_wc_q;
  word_t  w_result_q, w_data;

  // ---------------- write-back register ----------------
  logic   wb_we_q;
  reg_t   wb_wc_q;
  word_t  wb_data_q;

  // I stage
  assign irom_addr = pc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q          <= '0;
      fetch_valid_q <= 1'b0;
    end else begin
      pc_q          <= r_jump ? r_target : pc_q + 1'b1;
      fetch_valid_q <= 1'b1;
    end
  end

  // R stage
  assign ir        = fetch_valid_q ? irom_data : NOP;

  // Programming rule: the delay slot of a taken jump must not hold another
  // jump (its target would replace the first jump's before that target ran).
  a_no_jump_in_slot: assert property (@(posedge clk) disable iff (rst)
    r_jump |=> !(ir[15:14] == CLS_JUMP && ir != NOP))
    else $error("jump in the delay slot of a taken jump to %0d", pc_q);
  assign flags_eff = e_ctrl_q.is_alu ? alu_flags : cc_q;

  ee183_control u_control (
    .ir       (ir),
    .flags    (flags_eff),
    .ext_cond (ext_cond),
    .ctrl     (r_ctrl),
    .jump     (r_jump),
    .target   (r_target)
  );

  ee183_regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .ra_addr (r_ctrl.ra),
    .ra_data (rf_a),
    .rb_addr (r_ctrl.rb),
    .rb_data (rf_b),
    .we      (wb_we_q),
    .wa      (wb_wc_q),
    .wd      (wb_data_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      e_ctrl_q <= CTRL_NOP;
      e_a_q    <= '0;
      e_b_q    <= '0;
    end else begin
      e_ctrl_q <= r_ctrl;
      e_a_q    <= rf_a;
      e_b_q    <= rf_b;
    end
  end

  // E stage
  ee183_fwd u_fwd (
    .e_ra  (e_ctrl_q.ra),
    .e_rb  (e_ctrl_q.rb),
    .w_we  (w_we_q),
    .w_wc  (w_wc_q),
    .wb_we (wb_we_q),
    .wb_wc (wb_wc_q),
    .sel_a (sel_a),
    .sel_b (sel_b)
  );

  always_comb begin
    unique case (sel_a)
      2'd1:    opa = w_data;
      2'd2:    opa = wb_data_q;
      default: opa = e_a_q;
    endcase
    unique case (sel_b)
      2'd1:    opb = w_data;
      2'd2:    opb = wb_data_q;
      default: opb = e_b_q;
    endcase
  end

  ee183_alu u_alu (
    .op    (e_ctrl_q.op),
    .a     (opa),
    .b     (opb),
    .y     (alu_y),
    .flags (alu_flags)
  );

  assign e_result  = e_ctrl_q.is_lit ? e_ctrl_q.imm : alu_y;
  assign mem_addr  = opa;
  assign mem_wdata = opb;
  assign mem_we    = e_ctrl_q.is_store;
  assign mem_re    = e_ctrl_q.is_load;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_we_q     <= 1'b0;
      w_load_q   <= 1'b0;
      w_wc_q     <= '0;
      w_result_q <= '0;
      cc_q       <= '0;
    end else begin
      w_we_q     <= e_ctrl_q.we;
      w_load_q   <= e_ctrl_q.is_load;
      w_wc_q     <= e_ctrl_q.wc;
      w_result_q <= e_result;
      if (e_ctrl_q.is_alu) cc_q <= alu_flags;
    end
  end

  // W stage
  assign w_data = w_load_q ? mem_rdata : w_result_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_we_q   <= 1'b0;
      wb_wc_q   <= '0;
      wb_data_q <= '0;
    end else begin
      wb_we_q   <= w_we_q;
      wb_wc_q   <= w_wc_q;
      wb_data_q <= w_data;
    end
  end

endmodule
