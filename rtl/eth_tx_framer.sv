// Packs pulse amplitudes into Ethernet frames for the MAC's transmit FIFO.
//
// The acquisition delivers about 20 M amplitudes per second (200 Mbit/s of
// 10-bit values). They are uploaded to a PC over Gigabit Ethernet through a
// MAC core with a 32-bit transmit FIFO interface (data, sop, eop, mod,
// wren, rdy; byte 0 of the frame in bits 31:24). That much follows the
// design description; the framing itself is this design's choice:
//
//   word 0      destination MAC [47:16]
//   word 1      destination MAC [15:0], source MAC [47:32]
//   word 2      source MAC [31:0]
//   word 3      EtherType, 16-bit frame sequence number
//   word 4..    three amplitudes per word: bits 31:30 zero, then the
//               earliest amplitude in 29:20, the next in 19:10, the
//               latest in 9:0
//
// Packing three 10-bit values into 32 bits keeps the upload near the
// 200 Mbit/s of raw amplitude data (213 Mbit/s of payload at 20 MHz).
// A frame carries SAMPLES_PER_FRAME amplitudes and is only started when the
// FIFO holds all of its payload, so a frame never stalls for data. The MAC
// appends padding and the FCS. Frames are whole words, so ff_tx_mod is
// always 0. Amplitudes are grouped by three, and each group is written into
// a FIFO of FIFO_DEPTH words; a group that finds the FIFO full is dropped
// and counted in overflow_cnt. A word on the MAC interface stays unchanged
// while wren is high and rdy low.
//
// Timing: one frame word per cycle while rdy is high. At the 30 MHz parallel
// clock that is 960 Mbit/s against the 213 Mbit/s produced by a 20 MHz pulse
// train, so the FIFO only fills while the MAC holds rdy low.
module eth_tx_framer
  import lem_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_FRAME = 384,       // multiple of 3
  parameter int unsigned FIFO_DEPTH        = 512,       // words of three amplitudes
  parameter logic [47:0] DST_MAC           = 48'hFFFF_FFFF_FFFF,
  parameter logic [47:0] SRC_MAC           = 48'h0200_0000_0001,
  parameter logic [15:0] ETHERTYPE         = 16'h88B5
)(
  input  logic        clk,
  input  logic        rst_n,          // synchronous, active low
  input  logic        amp_valid,
  input  sample_t     amp,
  // MAC transmit FIFO interface
  output logic [31:0] ff_tx_data,
  output logic        ff_tx_sop,
  output logic        ff_tx_eop,
  output logic [1:0]  ff_tx_mod,      // empty bytes in the last word
  output logic        ff_tx_wren,
  input  logic        ff_tx_rdy,
  // status
  output logic [15:0] frame_cnt,      // frames sent, also the next sequence number
  output logic [15:0] overflow_cnt    // groups of three amplitudes dropped
);

  localparam int unsigned PAY_WORDS = SAMPLES_PER_FRAME / 3;
  localparam int unsigned HDR_WORDS = 4;
  localparam int unsigned FW        = $clog2(FIFO_DEPTH) + 1;

  typedef enum logic [1:0] {T_IDLE, T_HDR, T_PAY} tx_state_t;

  // ---------------- grouping and FIFO ----------------
  sample_t     amp0, amp1;            // first and second amplitude of a group
  logic [1:0]  n_held;                // amplitudes held, 0..2
  logic        grp_wr;               // group of three complete
  logic [31:0] grp_word;
  logic [31:0] fifo_head;
  logic        fifo_full, fifo_empty, fifo_rd;
  logic [FW-1:0] fifo_count;

  assign grp_wr   = amp_valid && (n_held == 2'd2);
  assign grp_word = {2'b00, amp0, amp1, amp};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_held       <= '0;
      amp0         <= '0;
      amp1         <= '0;
      overflow_cnt <= '0;
    end else if (amp_valid) begin
      n_held <= (n_held == 2'd2) ? 2'd0 : n_held + 1'b1;
      if (n_held == 2'd0) amp0 <= amp;
      if (n_held == 2'd1) amp1 <= amp;
      if (grp_wr && fifo_full && overflow_cnt != '1) overflow_cnt <= overflow_cnt + 1'b1;
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(grp_wr), .wr_data(grp_word),
    .rd_en(fifo_rd), .rd_data(fifo_head),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  // ---------------- frame transmitter ----------------
  tx_state_t state;
  logic [$clog2(PAY_WORDS+1)-1:0] widx;   // word index within the section
  logic accept;

  assign accept     = ff_tx_wren && ff_tx_rdy;
  assign ff_tx_wren = (state != T_IDLE);
  assign ff_tx_sop  = (state == T_HDR) && (widx == '0);
  assign ff_tx_eop  = (state == T_PAY) && (widx == ($bits(widx))'(PAY_WORDS - 1));
  assign ff_tx_mod  = 2'd0;
  assign fifo_rd    = accept && (state == T_PAY);

  always_comb begin
    ff_tx_data = fifo_head;
    if (state == T_HDR) begin
      unique case (widx[1:0])
        2'd0: ff_tx_data = DST_MAC[47:16];
        2'd1: ff_tx_data = {DST_MAC[15:0], SRC_MAC[47:32]};
        2'd2: ff_tx_data = SRC_MAC[31:0];
        default: ff_tx_data = {ETHERTYPE, frame_cnt};
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      widx      <= '0;
      frame_cnt <= '0;
    end else begin
      unique case (state)
        T_IDLE:
          if (fifo_count >= FW'(PAY_WORDS)) begin
            state <= T_HDR;
            widx  <= '0;
          end
        T_HDR:
          if (accept) begin
            if (widx == ($bits(widx))'(HDR_WORDS - 1)) begin
              state <= T_PAY;
              widx  <= '0;
            end else begin
              widx <= widx + 1'b1;
            end
          end
        T_PAY:
          if (accept) begin
            if (ff_tx_eop) begin
              state     <= T_IDLE;
              widx      <= '0;
              frame_cnt <= frame_cnt + 1'b1;
            end else begin
              widx <= widx + 1'b1;
            end
          end
        default: state <= T_IDLE;
      endcase
    end
  end

  // Avalon-style source rules: a word offered and not taken stays unchanged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ff_tx_wren && !ff_tx_rdy |=> ff_tx_wren && $stable(ff_tx_data)
                                               && $stable(ff_tx_sop) && $stable(ff_tx_eop));
  // A payload word is never read from an empty FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) fifo_rd |-> !fifo_empty);

  initial assert (SAMPLES_PER_FRAME >= 3 && SAMPLES_PER_FRAME % 3 == 0 && PAY_WORDS <= FIFO_DEPTH)
    else $error("SAMPLES_PER_FRAME must be a multiple of 3 and fit the FIFO");

endmodule
