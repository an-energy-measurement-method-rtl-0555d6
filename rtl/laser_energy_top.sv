// FPGA top level of the narrow laser pulse energy meter.
//
// A free-running 10-bit ADC samples the broadened detector pulse at 300 MSPS.
// Its ten LVDS bit lanes are deserialized by ten onto a 30 MHz parallel clock
// (lvds_deserializer). The amplitude acquisition follows the peak of every
// pulse of the 20 MHz train, 15 samples apart, and reports its ADC code
// (amplitude_acquisition). The amplitudes are packed into Ethernet frames
// for the MAC core's transmit FIFO interface (eth_tx_framer). Independently,
// spi_clk_config programs the clock generator that makes the ADC clock; it
// runs on the board clock, since the ADC clock only exists afterwards.
//
// Blocks outside this FPGA logic connect through ports: the ADC lanes, the
// PLL that derives clk_fast and clk_par from the ADC's clock, the clock
// generator's SPI pins and the MAC core (whose transmit FIFO clock is
// clk_par). The structure follows the design description; the clocking
// split, the frame format and all status outputs are this design's choices.
//
// Clock domains: clk_sys (board clock: SPI), clk_fast (300 MHz: lane
// shifting), clk_par (30 MHz, one tenth of clk_fast with a fixed phase from
// the PLL: acquisition, framing, MAC interface). rst_n is synchronous and
// must be held low for at least two clk_par cycles.
module laser_energy_top
  import lem_pkg::*;
#(
  parameter int unsigned PERIOD            = PULSE_PERIOD,
  parameter int unsigned SAMPLES_PER_FRAME = 384,
  parameter int unsigned FIFO_DEPTH        = 512,
  parameter int unsigned SPI_CLK_DIV       = 4
)(
  input  logic        clk_sys,
  input  logic        clk_fast,
  input  logic        clk_par,
  input  logic        rst_n,
  // ADC and its PLL
  input  logic        pll_locked,
  input  logic [ADC_BITS-1:0] adc_lane,
  // clock generator SPI
  output logic        spi_sclk,
  output logic        spi_mosi,
  output logic        spi_le,
  output logic        cfg_busy,
  output logic        cfg_done,
  // MAC transmit FIFO interface (clk_par)
  output logic [31:0] ff_tx_data,
  output logic        ff_tx_sop,
  output logic        ff_tx_eop,
  output logic [1:0]  ff_tx_mod,
  output logic        ff_tx_wren,
  input  logic        ff_tx_rdy,
  // status (clk_par)
  output logic        rx_locked,
  output logic        tracking,
  output logic        amp_valid,
  output sample_t     amp,
  output logic signed [4:0] peak_addr,   // peak position in its word, -1..10
  output logic [1:0]  peak_sel,          // 0 left, 1 predicted, 2 right sample won
  output logic [15:0] frame_cnt,
  output logic [15:0] overflow_cnt
);

  ch_words_t ch_words;

  spi_clk_config #(.CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk(clk_sys), .rst_n, .start(1'b0),
    .spi_sclk, .spi_mosi, .spi_le, .busy(cfg_busy), .done(cfg_done)
  );

  lvds_deserializer u_deser (
    .clk_fast, .clk_par, .rst_n, .pll_locked,
    .lane(adc_lane), .ch_words, .rx_locked
  );

  amplitude_acquisition #(.PERIOD(PERIOD)) u_acq (
    .clk(clk_par), .rst_n, .locked(rx_locked), .ch_words,
    .amp_valid, .amp, .peak_addr, .peak_sel, .tracking
  );

  eth_tx_framer #(.SAMPLES_PER_FRAME(SAMPLES_PER_FRAME), .FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .clk(clk_par), .rst_n, .amp_valid, .amp,
    .ff_tx_data, .ff_tx_sop, .ff_tx_eop, .ff_tx_mod, .ff_tx_wren, .ff_tx_rdy,
    .frame_cnt, .overflow_cnt
  );

endmodule
