// Shared constants, types and helpers for the laser pulse energy meter.
//
// The ADC delivers 10-bit samples at 300 MSPS over ten LVDS bit lanes. Each
// lane is deserialized by ten, so one 30 MHz parallel cycle carries ten
// consecutive samples. A deserialized channel word holds one ADC bit of those
// ten samples, the earliest sample in bit 9 and the latest in bit 0. The
// acquisition logic works on the transposed view: an array of ten samples in
// time order, index 0 being the earliest (the word's "highest bit").
// The laser repeats every 15 samples (20 MHz), so the next peak is expected
// 15 sample positions after the previous one.
package lem_pkg;

  localparam int unsigned ADC_BITS        = 10;  // AD9211-class 10-bit ADC
  localparam int unsigned DESER_FACTOR    = 10;  // deserialization factor
  localparam int unsigned PULSE_PERIOD    = 15;  // samples per laser period

  typedef logic [ADC_BITS-1:0] sample_t;

  // Ten channel words, one per ADC bit lane: ch_words[k][9-i] is bit k of
  // sample i of the parallel cycle.
  typedef logic [ADC_BITS-1:0][DESER_FACTOR-1:0] ch_words_t;

  // Ten samples in time order: samples[i] is sample i (0 = earliest).
  typedef sample_t [DESER_FACTOR-1:0] samples_t;

  // Transpose channel words into samples.
  function automatic samples_t to_samples(ch_words_t w);
    samples_t s;
    for (int i = 0; i < DESER_FACTOR; i++)
      for (int k = 0; k < ADC_BITS; k++)
        s[i][k] = w[k][DESER_FACTOR-1-i];
    return s;
  endfunction

  // Inverse of to_samples, used by stimulus generators.
  function automatic ch_words_t to_ch_words(samples_t s);
    ch_words_t w;
    for (int i = 0; i < DESER_FACTOR; i++)
      for (int k = 0; k < ADC_BITS; k++)
        w[k][DESER_FACTOR-1-i] = s[i][k];
    return w;
  endfunction

endpackage
