// SPI master that programs the ADC's clock generator after reset.
//
// The clock generator chip makes the ADC's 300 MHz LVDS sample clock and is
// set up by the FPGA over SPI. This block writes NUM_WORDS configuration
// words of WORD_BITS bits, one after the other, then raises done. Each word
// is framed by spi_le low; data change while spi_sclk is low and are taken
// by the chip on the rising edge; the rising edge of spi_le latches the word.
// LSB_FIRST selects the bit order. The bus runs at clk / (2*CLK_DIV).
//
// That the FPGA configures the clock chip over SPI follows the design
// description. The framing above is this design's choice, made after the
// usual 32-bit write format of such clock synthesizers (a 4-bit register
// address in the low bits, shifted LSB first). The register contents are
// not part of the description: REG_WORDS by default only carries the
// register addresses 0..NUM_WORDS-1 with zero data, and has to be filled in
// from the chip's data sheet for the wanted frequency plan.
//
// Timing: the sequence starts in the cycle after reset is released (and
// again on start). One word takes (2*WORD_BITS + 3) * CLK_DIV cycles:
// le setup, the bits, le hold and le high time; done rises
// 1 + NUM_WORDS * (2*WORD_BITS + 3) * CLK_DIV cycles after the start.
module spi_clk_config #(
  parameter int unsigned NUM_WORDS = 9,
  parameter int unsigned WORD_BITS = 32,
  parameter int unsigned CLK_DIV   = 4,
  parameter bit          LSB_FIRST = 1'b1,
  parameter logic [NUM_WORDS-1:0][WORD_BITS-1:0] REG_WORDS = default_words()
)(
  input  logic clk,       // board clock, independent of the ADC clock
  input  logic rst_n,     // synchronous, active low
  input  logic start,     // run the sequence again
  output logic spi_sclk,
  output logic spi_mosi,
  output logic spi_le,
  output logic busy,
  output logic done
);

  function automatic logic [NUM_WORDS-1:0][WORD_BITS-1:0] default_words();
    logic [NUM_WORDS-1:0][WORD_BITS-1:0] w;
    for (int i = 0; i < NUM_WORDS; i++) w[i] = WORD_BITS'(i % 16);
    return w;
  endfunction

  typedef enum logic [2:0] {C_IDLE, C_SETUP, C_LOW, C_HIGH, C_HOLD, C_GAP, C_DONE} cfg_state_t;

  cfg_state_t state;
  logic [$clog2(CLK_DIV)-1:0]     div_cnt;
  logic [$clog2(NUM_WORDS+1)-1:0] word_idx;
  logic [$clog2(WORD_BITS+1)-1:0] bit_idx;
  logic [WORD_BITS-1:0]           shreg;
  logic                           tick;
  logic                           kick;

  assign tick = (div_cnt == ($bits(div_cnt))'(CLK_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      div_cnt  <= '0;
      word_idx <= '0;
      bit_idx  <= '0;
      shreg    <= '0;
      spi_sclk <= 1'b0;
      spi_mosi <= 1'b0;
      spi_le   <= 1'b1;
      kick     <= 1'b1;    // run once after reset
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (start) kick <= 1'b1;
      unique case (state)
        C_IDLE, C_DONE:
          if (kick || start) begin
            kick     <= 1'b0;
            state    <= C_SETUP;
            word_idx <= '0;
            div_cnt  <= '0;
          end
        // le falls, first bit on mosi
        C_SETUP:
          if (tick) begin
            spi_le   <= 1'b0;
            shreg    <= REG_WORDS[word_idx];
            spi_mosi <= LSB_FIRST ? REG_WORDS[word_idx][0] : REG_WORDS[word_idx][WORD_BITS-1];
            bit_idx  <= '0;
            state    <= C_LOW;
          end
        C_LOW:
          if (tick) begin
            spi_sclk <= 1'b1;
            state    <= C_HIGH;
          end
        C_HIGH:
          if (tick) begin
            spi_sclk <= 1'b0;
            if (bit_idx == ($bits(bit_idx))'(WORD_BITS - 1)) begin
              state <= C_HOLD;
            end else begin
              bit_idx  <= bit_idx + 1'b1;
              shreg    <= LSB_FIRST ? shreg >> 1 : shreg << 1;
              spi_mosi <= LSB_FIRST ? shreg[1] : shreg[WORD_BITS-2];
              state    <= C_LOW;
            end
          end
        // le rises: the chip latches the word
        C_HOLD:
          if (tick) begin
            spi_le <= 1'b1;
            state  <= C_GAP;
          end
        C_GAP:
          if (tick) begin
            if (word_idx == ($bits(word_idx))'(NUM_WORDS - 1)) begin
              state <= C_DONE;
            end else begin
              word_idx <= word_idx + 1'b1;
              state    <= C_SETUP;
            end
          end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE) && (state != C_DONE);
  assign done = (state == C_DONE);

  // The clock only toggles inside a word.
  assert property (@(posedge clk) disable iff (!rst_n) spi_le |-> !spi_sclk);

endmodule
