// ee183_io: the memory-mapped inputs and outputs of the EE183 system.
//
// Sits on the processor's data bus beside the data RAM. Two words at the top
// of the 12-bit address space are taken from the RAM:
//   0xFFF  read: the DIP switches     write: the LED register
//   0xFFE  read: the free-running timer
// A write to an I/O address goes to the device and not to the RAM. Reads
// follow the RAM's timing (re marks a load): the address is given in E and the selected word is
// returned in the next cycle, so the decode of the address is registered. The
// lecture draws inputs and outputs on the data bus and mentions memory-mapped
// DIP switches, LEDs and a timer; the addresses and widths are this design's
// choices.
module ee183_io
  import ee183_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // processor side
  input  word_t addr,
  input  logic  we,
  input  logic  re,
  input  word_t wdata,
  output word_t rdata,
  // RAM side
  output logic  ram_we,
  input  word_t ram_rdata,
  // devices
  input  word_t switches,
  input  word_t timer,
  output word_t leds
);

  localparam word_t SW_ADDR    = 12'hFFF;
  localparam word_t LED_ADDR   = 12'hFFF;
  localparam word_t TIMER_ADDR = 12'hFFE;

  typedef enum logic [1:0] {SRC_RAM, SRC_SW, SRC_TIMER} src_e;
  src_e  src_q;
  word_t dev_q;

  assign ram_we = we && addr != LED_ADDR && addr != TIMER_ADDR;

  always_ff @(posedge clk) begin
    if (rst) begin
      leds  <= '0;
      src_q <= SRC_RAM;
      dev_q <= '0;
    end else begin
      if (we && addr == LED_ADDR) leds <= wdata;
      if (!re) begin
        src_q <= SRC_RAM;
        dev_q <= '0;
      end else if (addr == SW_ADDR) begin
        src_q <= SRC_SW;
        dev_q <= switches;
      end else if (addr == TIMER_ADDR) begin
        src_q <= SRC_TIMER;
        dev_q <= timer;
      end else begin
        src_q <= SRC_RAM;
        dev_q <= '0;
      end
    end
  end

  assign rdata = (src_q == SRC_RAM) ? ram_rdata : dev_q;

endmodule
