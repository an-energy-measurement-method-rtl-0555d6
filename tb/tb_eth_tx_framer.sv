// Self-checking testbench for eth_tx_framer (with its FIFO).
//
// Amplitudes arrive two cycles out of three, as from a 20 MHz pulse train at
// the 30 MHz parallel clock. The MAC side's rdy is random at first, then held
// low long enough to fill the FIFO, then high to drain it. A reference model
// groups the amplitudes by three, keeps its own FIFO of DEPTH words with the
// same full rule (a group finding the FIFO full is dropped) and pops a word for
// every payload word the framer hands over. Every frame is checked for its
// header words, sequence number, sop/eop placement and payload, and the
// framer's overflow and frame counters must equal the model's.
module tb_eth_tx_framer;
  import lem_pkg::*;

  localparam int SPF   = 9;
  localparam int DEPTH = 16;
  localparam logic [47:0] DST = 48'hFFFF_FFFF_FFFF;
  localparam logic [47:0] SRC = 48'h0200_0000_0001;
  localparam logic [15:0] ET  = 16'h88B5;
  localparam int FRAME_WORDS = 4 + SPF / 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic amp_valid = 1'b0;
  sample_t amp = '0;
  logic [31:0] ff_tx_data;
  logic ff_tx_sop, ff_tx_eop, ff_tx_wren;
  logic [1:0] ff_tx_mod;
  logic ff_tx_rdy = 1'b0;
  logic [15:0] frame_cnt, overflow_cnt;

  eth_tx_framer #(.SAMPLES_PER_FRAME(SPF), .FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int held = 0;
  sample_t a0_m, a1_m;
  int dropped = 0, frames = 0, fw = 0, stalls = 0, cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] hdr_word(int i, int seq);
    case (i)
      0: return DST[47:16];
      1: return {DST[15:0], SRC[47:32]};
      2: return SRC[31:0];
      default: return {ET, 16'(seq)};
    endcase
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      amp_valid = (cyc % 3) != 2;
      amp       = sample_t'($urandom);
      if (cyc < 2500)      ff_tx_rdy = ($urandom_range(0, 4) != 0);
      else if (cyc < 2700) ff_tx_rdy = 1'b0;
      else                 ff_tx_rdy = 1'b1;
      if (cyc >= 3800) amp_valid = 1'b0;   // let the FIFO drain
      #1;
      // reference model, evaluated just before the clock edge
      begin
        automatic bit full = (q.size() == DEPTH);
        if (ff_tx_wren && !ff_tx_rdy) stalls++;
        if (ff_tx_wren && ff_tx_rdy) begin
          check(ff_tx_sop == (fw == 0), "sop on the first word only");
          check(ff_tx_eop == (fw == FRAME_WORDS - 1), "eop on the last word only");
          check(ff_tx_mod == 2'd0, "no empty bytes");
          if (fw < 4) check(ff_tx_data == hdr_word(fw, frames), $sformatf("header word %0d", fw));
          else begin
            check(q.size() > 0 && ff_tx_data == q[0], "payload word");
            if (q.size() > 0) void'(q.pop_front());
          end
          if (fw == FRAME_WORDS - 1) begin
            fw = 0;
            frames++;
          end else fw++;
        end
        if (amp_valid) begin
          if (held == 2) begin
            if (full) dropped++;
            else q.push_back({2'b00, a0_m, a1_m, amp});
            held = 0;
          end else begin
            if (held == 0) a0_m = amp;
            else a1_m = amp;
            held++;
          end
        end
      end
    end
    @(negedge clk);
    check(frame_cnt == 16'(frames), $sformatf("frame count %0d vs %0d", frame_cnt, frames));
    check(overflow_cnt == 16'(dropped), $sformatf("overflow count %0d vs %0d", overflow_cnt, dropped));
    check(dropped > 0, "overflow happened");
    check(stalls > 0, "MAC back-pressure happened");
    check(q.size() < SPF / 3, "everything that fills a frame was sent");
    check(frames > 100, $sformatf("frames sent (%0d)", frames));
    $display("frames %0d dropped groups %0d stalls %0d", frames, dropped, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
