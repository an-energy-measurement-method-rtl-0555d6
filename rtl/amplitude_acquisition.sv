// Pulse amplitude acquisition on the deserialized ADC stream.
//
// The laser fires once every PERIOD samples (15 at 300 MSPS, i.e. 20 MHz) and
// the ADC runs free, without a clock synchronous to the laser. Each 30 MHz
// cycle brings ten samples. Once the position of one peak is known, the next
// peak is expected PERIOD samples later. For each predicted position the
// module compares the sample there with its two neighbours. The biggest of
// the three is the pulse amplitude, and its position becomes the new
// reference (last_max_addr) for the next prediction. The tracking follows
// the slow drift between the laser and the ADC clock by one sample per
// pulse at most.
//
// Pipeline: the incoming word is registered (cur), then moved to prev, the
// word being examined. The window is the last sample of the word before
// prev, the ten samples of prev and the first sample of cur, so a
// neighbour may lie in the adjacent word. exp_pos is the predicted peak
// position inside prev (0 = earliest sample). A word with exp_pos > 9 holds
// no peak and exp_pos drops by ten. After a peak at address a (-1..10)
// exp_pos becomes a + PERIOD - 10.
//
// The loop in the design description: wait until the deserializer is
// locked, compare the predicted sample and its two neighbours, keep the
// biggest as new maximum and new last_max_addr, output the amplitude with a
// valid strobe. This design's own additions: the first peak is found by
// taking the maximum over two whole words (20 samples, more than one
// period); on equal values the predicted sample wins over a neighbour; loss
// of lock restarts the search. The amplitude is the raw ADC code at the
// peak, without baseline subtraction.
//
// Interface: clk is the 30 MHz parallel clock. amp_valid pulses for one
// cycle per pulse, with amp (ADC code), peak_addr (position in the examined
// word, -1..10) and peak_sel (which of the three candidates won).
// Latency: three cycles from a word at ch_words to its amplitude. In steady
// state two amplitudes come out every three cycles (20 M amplitudes/s).
module amplitude_acquisition
  import lem_pkg::*;
#(
  parameter int unsigned PERIOD = PULSE_PERIOD  // samples per laser period, 11..20
)(
  input  logic             clk,
  input  logic             rst_n,      // synchronous, active low
  input  logic             locked,     // deserializer lock
  input  ch_words_t        ch_words,   // deserializer output
  output logic             amp_valid,
  output sample_t          amp,
  output logic signed [4:0] peak_addr,
  output logic [1:0]       peak_sel,   // 0 left neighbour, 1 predicted, 2 right neighbour
  output logic             tracking    // 1 once the first peak has been found
);

  localparam int N = DESER_FACTOR;

  typedef enum logic [2:0] {S_WAIT_LOCK, S_FILL, S_ACQ_A, S_ACQ_B, S_TRACK} state_t;

  state_t   state;
  samples_t cur, prev;
  sample_t  pp_last;                 // last sample of the word before prev
  logic [1:0] fill_cnt;
  logic signed [5:0] exp_pos;        // predicted peak position within prev
  sample_t  acq_max;                 // best value of the first search word
  logic signed [5:0] acq_pos;        // its position relative to the second word

  // 12-sample window: win[a+1] holds address a of prev, a = -1..10
  sample_t win [N+2];
  always_comb begin
    win[0] = pp_last;
    for (int i = 0; i < N; i++) win[i+1] = prev[i];
    win[N+1] = cur[0];
  end

  // maximum over the ten samples of prev (earliest wins on equal values)
  sample_t word_max;
  logic [3:0] word_max_idx;
  always_comb begin
    word_max     = prev[0];
    word_max_idx = '0;
    for (int i = 1; i < N; i++)
      if (prev[i] > word_max) begin
        word_max     = prev[i];
        word_max_idx = 4'(i);
      end
  end

  // three-way compare around the predicted position
  sample_t c_left, c_mid, c_right, c_best;
  logic [1:0] c_sel;
  logic [3:0] e_idx;
  always_comb begin
    e_idx   = exp_pos[3:0];
    c_left  = win[e_idx];
    c_mid   = win[e_idx + 4'd1];
    c_right = win[e_idx + 4'd2];
    c_best  = c_mid;
    c_sel   = 2'd1;
    if (c_left > c_best) begin
      c_best = c_left;
      c_sel  = 2'd0;
    end
    if (c_right > c_best) begin
      c_best = c_right;
      c_sel  = 2'd2;
    end
  end

  // acquisition result: the better of the two search words
  logic signed [5:0] acq_peak, acq_next;
  always_comb begin
    if (word_max > acq_max) acq_peak = 6'(word_max_idx);
    else                    acq_peak = acq_pos;
    acq_next = acq_peak + 6'(PERIOD) - 6'(N);
    if (acq_next < 0) acq_next = acq_next + 6'(PERIOD);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_WAIT_LOCK;
      cur       <= '0;
      prev      <= '0;
      pp_last   <= '0;
      fill_cnt  <= '0;
      exp_pos   <= '0;
      acq_max   <= '0;
      acq_pos   <= '0;
      amp_valid <= 1'b0;
      amp       <= '0;
      peak_addr <= '0;
      peak_sel  <= 2'd1;
    end else begin
      cur       <= to_samples(ch_words);
      prev      <= cur;
      pp_last   <= prev[N-1];
      amp_valid <= 1'b0;

      if (!locked) begin
        state    <= S_WAIT_LOCK;
        fill_cnt <= '0;
      end else begin
        unique case (state)
          S_WAIT_LOCK: begin
            state    <= S_FILL;
            fill_cnt <= '0;
          end
          // wait until cur, prev and pp_last all hold locked data
          S_FILL: begin
            fill_cnt <= fill_cnt + 1'b1;
            if (fill_cnt == 2'd2) state <= S_ACQ_A;
          end
          S_ACQ_A: begin
            acq_max <= word_max;
            acq_pos <= 6'(word_max_idx) - 6'(N);
            state   <= S_ACQ_B;
          end
          S_ACQ_B: begin
            exp_pos <= acq_next;
            state   <= S_TRACK;
          end
          S_TRACK: begin
            if (exp_pos < 6'(N)) begin
              amp_valid <= 1'b1;
              amp       <= c_best;
              peak_addr <= 5'(exp_pos + 6'(c_sel) - 6'sd1);
              peak_sel  <= c_sel;
              exp_pos   <= exp_pos + 6'(c_sel) - 6'sd1 + 6'(PERIOD) - 6'(N);
            end else begin
              exp_pos   <= exp_pos - 6'(N);
            end
          end
          default: state <= S_WAIT_LOCK;
        endcase
      end
    end
  end

  assign tracking = (state == S_TRACK);

  // The prediction stays inside the window: 0..PERIOD after any update.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_TRACK |-> exp_pos >= 0 && exp_pos <= 6'(PERIOD));

  initial assert (PERIOD > N && PERIOD <= 2 * N)
    else $error("PERIOD must lie between %0d and %0d", N + 1, 2 * N);

endmodule
