// ee183_system: the EE183 microcontroller as a whole: processor core,
// instruction ROM, data RAM and memory-mapped I/O on one data bus.
//
// The core fetches from the ROM and loads and stores through ee183_io, which
// passes ordinary addresses to the RAM and takes two addresses at the top of
// the map for the DIP switches/LEDs (0xFFF) and the free-running timer
// (0xFFE). ext_cond is the external condition a jump can test. The
// arrangement (ROM, core, RAM, inputs and outputs on the data bus, an external
// condition and a reset) follows the lecture's system drawing; the ROM load
// port is this design's way of putting a program in the ROM.
module ee183_system
  import ee183_pkg::*;
#(
  parameter int unsigned IROM_DEPTH = 256,
  parameter int unsigned DRAM_DEPTH = 4096,
  parameter string       IROM_INIT  = ""
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ext_cond,
  input  word_t  switches,
  output word_t  leds,
  input  logic   prog_we,
  input  pc_t    prog_addr,
  input  instr_t prog_data
);

  pc_t    irom_addr;
  instr_t irom_data;
  word_t  mem_addr, mem_wdata, mem_rdata, ram_rdata, timer;
  logic   mem_we, mem_re, ram_we;

  ee183_cpu u_cpu (
    .clk       (clk),
    .rst       (rst),
    .ext_cond  (ext_cond),
    .irom_addr (irom_addr),
    .irom_data (irom_data),
    .mem_addr  (mem_addr),
    .mem_we    (mem_we),
    .mem_re    (mem_re),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata)
  );

  ee183_irom #(.DEPTH(IROM_DEPTH), .INIT_FILE(IROM_INIT)) u_irom (
    .clk       (clk),
    .addr      (irom_addr[$clog2(IROM_DEPTH)-1:0]),
    .data      (irom_data),
    .load_we   (prog_we),
    .load_addr (prog_addr[$clog2(IROM_DEPTH)-1:0]),
    .load_data (prog_data)
  );

  ee183_dram #(.DEPTH(DRAM_DEPTH)) u_dram (
    .clk   (clk),
    .addr  (mem_addr[$clog2(DRAM_DEPTH)-1:0]),
    .we    (ram_we),
    .wdata (mem_wdata),
    .rdata (ram_rdata)
  );

  ee183_timer u_timer (
    .clk   (clk),
    .rst   (rst),
    .count (timer)
  );

  ee183_io u_io (
    .clk       (clk),
    .rst       (rst),
    .addr      (mem_addr),
    .we        (mem_we),
    .re        (mem_re),
    .wdata     (mem_wdata),
    .rdata     (mem_rdata),
    .ram_we    (ram_we),
    .ram_rdata (ram_rdata),
    .switches  (switches),
    .timer     (timer),
    .leds      (leds)
  );

endmodule
