// 1:10 deserializer for the ten ADC bit lanes.
//
// The ADC sends every 10-bit sample in parallel, one bit per LVDS lane, at
// 300 MSPS. Each lane is shifted into a 10-bit register on the fast clock;
// every tenth fast cycle the ten shift registers are copied to a holding
// register, which then stays unchanged for ten fast cycles. The parallel
// clock (30 MHz, one tenth of the fast clock, from the same PLL) samples
// the holding register, so one parallel cycle carries ten consecutive samples
// per lane. Within a channel word the earliest bit sits in bit 9.
//
// The deserialization factor of 10, the 30 MHz parallel clock and the
// channel/bit layout follow the design description. The rest is this
// design's choice: no bit-slip or word alignment is done (any grouping of
// ten samples is valid, the acquisition logic accepts any phase); rx_locked
// is the PLL lock, synchronised into the parallel domain and held low until
// a first complete word has been captured. clk_par must rise while the
// holding register is stable, i.e. not on the fast edge that updates it;
// the PLL provides that phase in hardware. When the PLL loses lock,
// rx_locked falls two to three parallel cycles later; the words of those
// cycles are not valid.
//
// Interface: lane[k] is ADC bit k sampled on clk_fast. ch_words[k] is the
// 10-bit word of lane k, valid in the clk_par domain while rx_locked is 1.
// Latency from the last bit of a word to ch_words is one to two parallel
// cycles, depending on the clock phase.
module lvds_deserializer
  import lem_pkg::*;
(
  input  logic      clk_fast,    // 300 MHz bit clock
  input  logic      clk_par,     // 30 MHz parallel clock
  input  logic      rst_n,       // synchronous, active low, held for >= 2 parallel cycles
  input  logic      pll_locked,  // lock of the PLL that makes both clocks
  input  logic [ADC_BITS-1:0] lane,
  output ch_words_t ch_words,
  output logic      rx_locked
);

  // ---------------- fast domain ----------------
  logic [$clog2(DESER_FACTOR)-1:0] bit_cnt;
  ch_words_t shreg;
  ch_words_t hold;
  logic      hold_valid;

  always_ff @(posedge clk_fast) begin
    if (!rst_n || !pll_locked) begin
      bit_cnt    <= '0;
      shreg      <= '0;
      hold       <= '0;
      hold_valid <= 1'b0;
    end else begin
      for (int k = 0; k < ADC_BITS; k++)
        shreg[k] <= {shreg[k][DESER_FACTOR-2:0], lane[k]};
      if (bit_cnt == ($bits(bit_cnt))'(DESER_FACTOR - 1)) begin
        bit_cnt <= '0;
        for (int k = 0; k < ADC_BITS; k++)
          hold[k] <= {shreg[k][DESER_FACTOR-2:0], lane[k]};
        hold_valid <= 1'b1;
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  // ---------------- parallel domain ----------------
  logic [1:0] lock_sync;

  always_ff @(posedge clk_par) begin
    if (!rst_n) begin
      lock_sync <= '0;
      ch_words  <= '0;
      rx_locked <= 1'b0;
    end else begin
      lock_sync <= {lock_sync[0], pll_locked & hold_valid};
      ch_words  <= hold;
      rx_locked <= lock_sync[1];
    end
  end

endmodule
