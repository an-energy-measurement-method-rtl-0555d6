// End-to-end testbench for laser_energy_top at its default parameters.
//
// The board clock runs the SPI configuration of the clock generator; the PLL
// lock (and with it the ADC data) only comes after done, as on the board. A
// 20 MHz pulse train is then fed onto the ADC lanes, one 10-bit sample per
// fast clock. Each pulse has a short rise and a longer fall; the peak of
// pulse k has the code 40 + 600 + (37*k mod 301), so any 301 consecutive
// pulses have distinct peaks and a reported amplitude tells which pulse it
// is. The train has the nominal 15-sample spacing first, then the spacing
// jumps to 14 or 16 now and then (drift between laser and ADC clock).
//
// Checked: the SPI sequence ends before lock; the amplitudes out of the
// acquisition are the peaks of consecutive pulses, with exactly one gap, at
// the deliberate loss of lock; two amplitudes per three parallel cycles over
// a stretch of nominal spacing; every Ethernet frame has the right header,
// sequence number, sop and eop; the payload is the acquisition stream with
// whole groups of three removed only while the MAC held rdy low, as many as
// overflow_cnt says. Each mechanism must occur at least once: left, predicted
// and right sample chosen, words without a peak, MAC back-pressure, FIFO
// overflow, loss and return of lock.
module tb_laser_energy_top;
  import lem_pkg::*;

  localparam int SPF     = 384;        // the top's defaults
  localparam int NCYC    = 7000;       // parallel cycles after start
  localparam int NS      = NCYC * 10 + 100;
  localparam int RATE_C0 = 800, RATE_C1 = 1100;
  localparam int DRIFT_SAMPLE = 12000;
  localparam int STALL_C0 = 2000, STALL_C1 = 4600;
  localparam int DROP_C0 = 5000, DROP_C1 = 5020;

  logic clk_sys = 1'b0, clk_fast = 1'b0, clk_par = 1'b0;
  logic rst_n = 1'b0, pll_locked = 1'b0;
  logic [ADC_BITS-1:0] adc_lane = '0;
  logic spi_sclk, spi_mosi, spi_le, cfg_busy, cfg_done;
  logic [31:0] ff_tx_data;
  logic ff_tx_sop, ff_tx_eop, ff_tx_wren;
  logic [1:0] ff_tx_mod;
  logic ff_tx_rdy = 1'b1;
  logic rx_locked, tracking, amp_valid;
  sample_t amp;
  logic signed [4:0] peak_addr;
  logic [1:0] peak_sel;
  logic [15:0] frame_cnt, overflow_cnt;

  laser_energy_top dut (.*);

  spi_slave_model #(.WORD_BITS(32), .LSB_FIRST(1'b1)) clkgen (.sclk(spi_sclk), .mosi(spi_mosi), .le(spi_le));

  always #10 clk_sys = ~clk_sys;
  initial begin
    #5;
    forever #5 clk_fast = ~clk_fast;
  end
  always #50 clk_par = ~clk_par;

  int checks = 0, failures = 0;
  int smp [NS];
  int ppos [NS/13];
  int npulse = 0;

  // ADC lanes: sample n during fast cycle n
  initial begin
    automatic int n = 0;
    forever begin
      @(negedge clk_fast);
      if (n < NS) adc_lane = ADC_BITS'(smp[n]);
      n++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int shape16(int d);
    case (d)
      -2: return 4;  -1: return 10; 1: return 9;
       2: return 5;   3: return 2;  4: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int peak_code(int k);
    return 40 + 600 + (37 * k) % 301;
  endfunction

  // pulse index of an amplitude, searching forward from 'from'
  function automatic int match(int v, int from, int span);
    for (int k = from; k < npulse && k < from + span; k++)
      if (peak_code(k) == v) return k;
    return -1;
  endfunction

  int acq [$];           // amplitudes out of the acquisition, in order
  int pay [$];           // amplitudes out of the Ethernet frames, in order
  int sel_cnt [3] = '{0, 0, 0};
  int nopeak = 0, stalls = 0, rate_cnt = 0, frames = 0, fw = 0;
  int relock = 0;
  int cyc = 0;

  initial begin
    int p, k;
    for (int i = 0; i < NS; i++) smp[i] = 40 + int'($urandom_range(0, 4));
    p = 7;
    k = 0;
    while (p < NS - 6) begin
      ppos[npulse++] = p;
      for (int d = -2; d <= 4; d++)
        if (p + d >= 0) smp[p+d] += (peak_code(k) - 40) * shape16(d) / 16;
      smp[p] = peak_code(k);
      k++;
      if (p < DRIFT_SAMPLE) p += 15;
      else case ($urandom_range(0, 7))
        0: p += 14;
        1: p += 16;
        default: p += 15;
      endcase
    end
  end

  // parallel-clock monitor and stimulus
  initial begin
    automatic int cfg_cyc = -1;
    repeat (3) @(negedge clk_par);
    rst_n = 1'b1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk_par);
      if (cfg_done && cfg_cyc < 0) cfg_cyc = cyc;
      if (cfg_cyc >= 0 && cyc == cfg_cyc + 50) pll_locked = 1'b1;
      if (cyc < cfg_cyc + 50 || cfg_cyc < 0) check(!rx_locked, "no lock before the clock is configured");
      if (cyc == DROP_C0) pll_locked = 1'b0;
      if (cyc == DROP_C1) pll_locked = 1'b1;
      if (cyc > DROP_C1 && tracking && relock == 0) relock = cyc;
      if (cyc >= STALL_C0 && cyc < STALL_C1) ff_tx_rdy = 1'b0;
      else ff_tx_rdy = ($urandom_range(0, 9) != 0);
      #1;
      if (amp_valid) begin
        acq.push_back(int'(amp));
        sel_cnt[peak_sel]++;
        if (cyc >= RATE_C0 && cyc < RATE_C1) rate_cnt++;
      end else if (tracking) nopeak++;
      if (ff_tx_wren && !ff_tx_rdy) stalls++;
      if (ff_tx_wren && ff_tx_rdy) begin
        check(ff_tx_sop == (fw == 0) && ff_tx_eop == (fw == 3 + SPF / 3), "sop/eop placement");
        case (fw)
          0: check(ff_tx_data == 32'hFFFF_FFFF, "destination address");
          1: check(ff_tx_data == 32'hFFFF_0200, "destination/source address");
          2: check(ff_tx_data == 32'h0000_0001, "source address");
          3: check(ff_tx_data == {16'h88B5, 16'(frames)}, "EtherType and sequence number");
          default: begin
            check(ff_tx_data[31:30] == 2'b00, "spare payload bits are zero");
            pay.push_back(int'(ff_tx_data[29:20]));
            pay.push_back(int'(ff_tx_data[19:10]));
            pay.push_back(int'(ff_tx_data[9:0]));
          end
        endcase
        if (fw == 3 + SPF / 3) begin
          fw = 0;
          frames++;
        end else fw++;
      end
    end

    check(clkgen.nwords == 9, "nine configuration words written");
    check(cfg_cyc > 0, "configuration finished");

    // acquisition stream against the generated pulses
    begin
      automatic int last = -1, gaps = 0, nomatch = 0, from = 0;
      // no pulse before the PLL lock can be reported
      while (from < npulse && ppos[from] < (cfg_cyc + 50) * 10) from++;
      foreach (acq[i]) begin
        automatic int kk = (last < 0) ? match(acq[i], from, 100) : match(acq[i], last + 1, 250);
        if (kk < 0) nomatch++;
        else begin
          if (last >= 0 && kk != last + 1) gaps++;
          last = kk;
        end
      end
      check(nomatch == 0, $sformatf("every amplitude is a pulse peak (%0d not)", nomatch));
      check(gaps == 1, $sformatf("one gap in the pulse sequence, at the loss of lock (%0d)", gaps));
      check(last >= npulse - 70, $sformatf("tracked to the end (%0d of %0d)", last, npulse));
    end
    check(rate_cnt >= (RATE_C1 - RATE_C0) * 2 / 3 - 1 && rate_cnt <= (RATE_C1 - RATE_C0) * 2 / 3 + 1,
          $sformatf("rate %0d amplitudes in %0d cycles", rate_cnt, RATE_C1 - RATE_C0));

    // Ethernet payload against the acquisition stream: whole groups dropped
    begin
      automatic int i = 0, dropped = 0, bad = 0;
      for (int j = 0; j + 2 < pay.size(); j += 3) begin
        while (i + 2 < acq.size() && !(acq[i] == pay[j] && acq[i+1] == pay[j+1] && acq[i+2] == pay[j+2])) begin
          i += 3;
          dropped++;
        end
        if (i + 2 >= acq.size()) bad++;
        i += 3;
      end
      check(bad == 0, "payload follows the acquisition stream");
      check(dropped == int'(overflow_cnt), $sformatf("dropped groups %0d, overflow count %0d", dropped, overflow_cnt));
      check(acq.size() - i <= SPF + 2, "nothing left behind but the last partial frame");
    end
    check(frame_cnt == 16'(frames), "frame counter");

    // every mechanism happened
    check(sel_cnt[0] > 0, "left neighbour chosen");
    check(sel_cnt[1] > 0, "predicted sample chosen");
    check(sel_cnt[2] > 0, "right neighbour chosen");
    check(nopeak > 0, "words without a peak");
    check(stalls > 0, "MAC back-pressure");
    check(overflow_cnt > 0, "FIFO overflow");
    check(relock > 0, "lock lost and tracking resumed");
    $display("pulses %0d amplitudes %0d frames %0d | left %0d centre %0d right %0d | no-peak words %0d stalls %0d overflow groups %0d relock at %0d",
             npulse, acq.size(), frames, sel_cnt[0], sel_cnt[1], sel_cnt[2], nopeak, stalls, overflow_cnt, relock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk_par);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
