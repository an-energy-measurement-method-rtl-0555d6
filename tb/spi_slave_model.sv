// Behavioural SPI receiver for testbenches: the write side of a clock
// generator's serial port. While le is low it takes mosi on every rising
// sclk edge; on the rising edge of le it stores the word (LSB_FIRST as the
// master) and the number of bits it got.
module spi_slave_model #(
  parameter int unsigned WORD_BITS = 32,
  parameter bit          LSB_FIRST = 1'b1,
  parameter int unsigned MAX_WORDS = 64
)(
  input logic sclk,
  input logic mosi,
  input logic le
);
  logic [WORD_BITS-1:0] words [MAX_WORDS];
  int nbits [MAX_WORDS];
  int nwords = 0;
  logic [WORD_BITS-1:0] sh = '0;
  int cnt = 0;
  bit framing = 1'b0;   // a falling le has been seen

  always @(posedge sclk) if (!le) begin
    if (LSB_FIRST) sh = {mosi, sh[WORD_BITS-1:1]};
    else           sh = {sh[WORD_BITS-2:0], mosi};
    cnt++;
  end

  always @(negedge le) begin
    framing = 1'b1;
    cnt = 0;
    sh  = '0;
  end

  always @(posedge le) if (framing && nwords < MAX_WORDS) begin
    framing = 1'b0;
    words[nwords] = sh;
    nbits[nwords] = cnt;
    nwords++;
  end
endmodule
