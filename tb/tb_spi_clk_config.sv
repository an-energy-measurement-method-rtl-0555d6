// Self-checking testbench for spi_clk_config.
//
// Two masters, one LSB-first and one MSB-first, each with its own table of
// words, write into behavioural SPI receivers. Every word must arrive
// complete (WORD_BITS clock edges inside one le-low window) and in table
// order, and done must rise exactly 1 + NUM_WORDS*(2*WORD_BITS+3)*CLK_DIV
// cycles after reset is released. A start pulse must run the sequence again.
module tb_spi_clk_config;

  localparam int NW = 5;
  localparam int WB = 32;
  localparam int DIV = 3;
  localparam logic [NW-1:0][WB-1:0] TBL_A = {32'hDEAD_BEE4, 32'h1234_5673, 32'h8000_0012, 32'h0F0F_0F01, 32'hA5C3_9E70};
  localparam logic [NW-1:0][WB-1:0] TBL_B = {32'h0000_0001, 32'hFFFF_FFFE, 32'h7654_3210, 32'h0BAD_F00D, 32'hC001_D00D};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic sclk_a, mosi_a, le_a, busy_a, done_a;
  logic sclk_b, mosi_b, le_b, busy_b, done_b;

  spi_clk_config #(.NUM_WORDS(NW), .WORD_BITS(WB), .CLK_DIV(DIV), .LSB_FIRST(1'b1), .REG_WORDS(TBL_A))
    dut_a (.clk, .rst_n, .start, .spi_sclk(sclk_a), .spi_mosi(mosi_a), .spi_le(le_a), .busy(busy_a), .done(done_a));
  spi_clk_config #(.NUM_WORDS(NW), .WORD_BITS(WB), .CLK_DIV(DIV), .LSB_FIRST(1'b0), .REG_WORDS(TBL_B))
    dut_b (.clk, .rst_n, .start, .spi_sclk(sclk_b), .spi_mosi(mosi_b), .spi_le(le_b), .busy(busy_b), .done(done_b));

  spi_slave_model #(.WORD_BITS(WB), .LSB_FIRST(1'b1)) rx_a (.sclk(sclk_a), .mosi(mosi_a), .le(le_a));
  spi_slave_model #(.WORD_BITS(WB), .LSB_FIRST(1'b0)) rx_b (.sclk(sclk_b), .mosi(mosi_b), .le(le_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!done_a) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1 + NW * (2 * WB + 3) * DIV, $sformatf("sequence length %0d cycles", cyc));
    check(done_b, "both masters finish together");
    check(rx_a.nwords == NW && rx_b.nwords == NW, "word count");
    for (int i = 0; i < NW; i++) begin
      check(rx_a.nbits[i] == WB && rx_b.nbits[i] == WB, "bits per word");
      check(rx_a.words[i] == TBL_A[i], $sformatf("LSB-first word %0d %h", i, rx_a.words[i]));
      check(rx_b.words[i] == TBL_B[i], $sformatf("MSB-first word %0d %h", i, rx_b.words[i]));
    end
    repeat (20) @(negedge clk);
    check(rx_a.nwords == NW, "nothing more after done");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy_a, "start runs again");
    wait (done_a);
    @(negedge clk);
    check(rx_a.nwords == 2 * NW, "second sequence complete");
    for (int i = 0; i < NW; i++) check(rx_a.words[NW + i] == TBL_A[i], "second sequence words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NW * (2 * WB + 3) * DIV + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
