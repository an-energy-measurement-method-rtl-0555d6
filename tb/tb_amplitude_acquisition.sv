// Self-checking testbench for amplitude_acquisition.
//
// A pulse train is generated as 10-bit ADC samples: a fixed asymmetric pulse
// shape (short rise, longer fall) scaled by a random amplitude, on a baseline
// with a little noise. The first part has the nominal 15-sample spacing and is
// used to check the output rate (two amplitudes per three parallel cycles).
// The second part lets the spacing jump to 14 or 16 now and then, so the
// tracker must move to the left or right neighbour. Lock is dropped for a
// while and the search must start again. Every amplitude the module reports
// must sit on a generated peak and carry that peak's sample value, and once
// tracking, no pulse may be skipped or reported twice.
module tb_amplitude_acquisition;
  import lem_pkg::*;

  localparam int NWORDS   = 1200;
  localparam int NS       = NWORDS * 10;
  localparam int RATE_W0  = 100;     // rate window, in words
  localparam int RATE_W1  = 400;
  localparam int DROP_AT  = 800;     // lock is dropped here ...
  localparam int DROP_LEN = 20;      // ... for this many words
  localparam int MAXP     = NS / 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic locked = 1'b0;
  ch_words_t ch_words = '0;
  logic amp_valid, tracking;
  sample_t amp;
  logic signed [4:0] peak_addr;
  logic [1:0] peak_sel;

  amplitude_acquisition dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int smp [NS];
  int ppos [MAXP];
  int npulse = 0;
  int sel_cnt [3] = '{0, 0, 0};
  int rate_cnt = 0;
  int last_idx = -1;
  int reacq = 0;

  // pulse shape in sixteenths, offsets -2..+4 around the peak
  function automatic int shape16(int d);
    case (d)
      -2: return 4;  -1: return 10; 0: return 16; 1: return 9;
       2: return 5;   3: return 2;  4: return 1;
      default: return 0;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int find_pulse(int pos);
    for (int i = 0; i < npulse; i++) if (ppos[i] == pos) return i;
    return -1;
  endfunction

  initial begin
    int p, amp_i;
    samples_t s;
    // build the sample stream
    for (int i = 0; i < NS; i++) smp[i] = 40 + int'($urandom_range(0, 4));
    p = int'($urandom_range(3, 17));
    while (p < NS - 6) begin
      ppos[npulse++] = p;
      amp_i = int'($urandom_range(600, 900));
      for (int d = -2; d <= 4; d++)
        if (p + d >= 0 && p + d < NS) smp[p+d] += amp_i * shape16(d) / 16;
      if (p < RATE_W1 * 10 + 30) p += 15;
      else case ($urandom_range(0, 7))
        0: p += 14;
        1: p += 16;
        default: p += 15;
      endcase
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NWORDS + 3; j++) begin
      @(negedge clk);
      // outputs now belong to word j-3
      if (j >= DROP_AT + 2 && j < DROP_AT + DROP_LEN)
        check(!amp_valid && !tracking, "no output while unlocked");
      if (amp_valid) begin
        int pos, idx;
        pos = (j - 3) * 10 + int'(peak_addr);
        idx = find_pulse(pos);
        check(idx >= 0, $sformatf("amplitude at a true peak (pos %0d)", pos));
        if (idx >= 0) begin
          check(amp == sample_t'(smp[pos]), "amplitude value");
          if (last_idx >= 0) check(idx == last_idx + 1, "no pulse skipped or repeated");
          last_idx = idx;
        end
        sel_cnt[peak_sel]++;
        if (j - 3 >= RATE_W0 && j - 3 < RATE_W1) rate_cnt++;
      end
      if (j == DROP_AT) begin
        locked = 1'b0;
        last_idx = -1;
      end
      if (j == DROP_AT + DROP_LEN) locked = 1'b1;
      if (j == 2) locked = 1'b1;
      if (j > DROP_AT + DROP_LEN && tracking && reacq == 0) reacq = 1;
      if (j < NWORDS) begin
        for (int i = 0; i < 10; i++) s[i] = sample_t'(smp[j*10 + i]);
        ch_words = to_ch_words(s);
      end
    end
    // 15-sample period: 2 pulses per 3 words of 10 samples
    check(rate_cnt >= (RATE_W1 - RATE_W0) * 2 / 3 - 1 && rate_cnt <= (RATE_W1 - RATE_W0) * 2 / 3 + 1,
          $sformatf("rate %0d amplitudes in %0d cycles", rate_cnt, RATE_W1 - RATE_W0));
    check(reacq == 1, "tracking resumed after lock returned");
    check(last_idx >= npulse - 3, $sformatf("tracked to the end (%0d of %0d)", last_idx, npulse));
    check(sel_cnt[0] > 0, "left neighbour chosen at least once");
    check(sel_cnt[1] > 0, "predicted sample chosen at least once");
    check(sel_cnt[2] > 0, "right neighbour chosen at least once");
    $display("pulses %0d, left %0d centre %0d right %0d", npulse, sel_cnt[0], sel_cnt[1], sel_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
