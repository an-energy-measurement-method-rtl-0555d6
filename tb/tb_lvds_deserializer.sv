// Self-checking testbench for lvds_deserializer.
//
// Random 10-bit samples are driven onto the ten lanes, one sample per fast
// clock. Every parallel cycle the ten channel words are transposed back into
// samples; they must be ten consecutive samples of the stream, and the next
// word must follow on directly (ten samples later), so nothing is lost or
// repeated. rx_locked must follow the PLL lock: low while it is low, high
// again a few parallel cycles after it returns. After the PLL loses lock,
// rx_locked falls only after the two-stage synchroniser, and the words of
// those cycles are not checked.
module tb_lvds_deserializer;
  import lem_pkg::*;

  localparam int NSMP = 4000;

  logic clk_fast = 1'b0, clk_par = 1'b0;
  logic rst_n = 1'b0, pll_locked = 1'b0;
  logic [ADC_BITS-1:0] lane = '0;
  ch_words_t ch_words;
  logic rx_locked;

  lvds_deserializer dut (.*);

  // fast edges at 5, 15, 25 ...; parallel edges at 50, 150 ... (1:10, fixed phase)
  initial begin
    #5;
    forever #5 clk_fast = ~clk_fast;
  end
  always #50 clk_par = ~clk_par;

  int checks = 0, failures = 0;
  sample_t stream [NSMP];
  int sent = 0;
  int next_start = -1;
  int words_ok = 0;
  int relock = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // lane driver
  initial begin
    foreach (stream[i]) stream[i] = sample_t'($urandom);
    forever begin
      @(negedge clk_fast);
      if (sent < NSMP) lane = stream[sent];
      sent++;
    end
  end

  // parallel-side checker
  initial begin
    samples_t s;
    int start;
    repeat (3) @(negedge clk_par);
    rst_n = 1'b1;
    repeat (2) @(negedge clk_par);
    check(!rx_locked, "no lock before the PLL locks");
    pll_locked = 1'b1;
    for (int c = 0; c < NSMP / 10 - 8; c++) begin
      @(negedge clk_par);
      if (c == 150) begin
        pll_locked = 1'b0;
        next_start = -1;
      end
      if (c == 156) check(!rx_locked, "lock lost with the PLL");
      if (c == 160) pll_locked = 1'b1;
      if (c > 160 && rx_locked && relock == 0) relock = c;
      if (!rx_locked) next_start = -1;
      // words in the lock-synchroniser delay after a PLL loss are not valid
      if (rx_locked && !(c >= 150 && c < 155)) begin
        s = to_samples(ch_words);
        start = -1;
        for (int i = 0; i + 9 < sent && i + 9 < NSMP; i++) begin
          automatic bit m = 1'b1;
          for (int k = 0; k < 10; k++) if (stream[i+k] != s[k]) m = 1'b0;
          if (m) begin start = i; break; end
        end
        check(start >= 0, "word is ten consecutive samples");
        if (next_start >= 0) check(start == next_start, "words follow on without gap");
        if (start >= 0) begin
          next_start = start + 10;
          words_ok++;
        end
      end
    end
    check(relock > 0 && relock < 166, "lock returns after the PLL relocks");
    check(words_ok > 300, $sformatf("enough locked words (%0d)", words_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSMP / 10 + 100) @(posedge clk_par);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
