// Single-clock first-word-fall-through FIFO.
//
// A circular buffer of DEPTH words with read and write pointers one bit wider
// than the address, so full and empty are told apart by the top bit. The
// head word is always visible on rd_data while empty is 0; rd_en pops it.
// A write while full is ignored (the caller counts it as an overflow); a
// write and a read may happen in the same cycle. Count is the number of words
// held. Used by the Ethernet framer to absorb the gap between the steady
// amplitude stream and the bursty frame transmission.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512   // power of two
)(
  input  logic                     clk,
  input  logic                     rst_n,   // synchronous, active low
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  assign count   = wr_ptr - rd_ptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (wr_ptr == rd_ptr);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_en && !full) wr_ptr <= wr_ptr + 1'b1;
      if (rd_en && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("DEPTH must be a power of two");

endmodule
