// tb_spi_slave: self-checking test of the SPI slave against a behavioural
// master.
//
// The master model drives CS, the serial clock (idle high) and MOSI with a
// half period of HALF system clocks, changes MOSI at rising edges and samples
// MISO at falling edges. Each transfer checks both received words, that
// `rx_valid` pulses exactly once after CS rises, and that MISO is enabled
// only while selected. A transfer cut short by CS after four bits must not
// raise `rx_valid`. The test runs at the default half period and at the
// shortest one the slave supports.
module tb_spi_slave;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] tx_data = '0;
  logic [W-1:0] rx_data;
  logic         rx_valid;
  logic         sclk = 1'b1, cs_n = 1'b1, mosi = 1'b1;
  logic         miso, miso_oe;
  int           checks = 0, failures = 0;
  int           valid_pulses = 0;
  int           half = serial_pkg::SPI_HALF_DIV;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rx_valid) valid_pulses++;

  spi_slave #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .rx_data(rx_data), .rx_valid(rx_valid),
    .sclk(sclk), .cs_n(cs_n), .mosi(mosi), .miso(miso), .miso_oe(miso_oe)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_half();
    repeat (half) @(negedge clk);
  endtask

  task automatic transfer(input logic [W-1:0] m_word, input logic [W-1:0] s_word,
                          input int nbits);
    logic [W-1:0] got;
    int           n_prev;
    n_prev  = valid_pulses;
    tx_data = s_word;
    got     = '0;
    @(negedge clk);
    cs_n = 1'b0;
    mosi = m_word[W-1];
    wait_half();
    check(miso_oe, "MISO not enabled while selected");
    for (int i = 0; i < nbits; i++) begin
      sclk = 1'b0;                         // falling edge: master samples
      got  = {got[W-2:0], miso};
      wait_half();
      sclk = 1'b1;                         // rising edge: master shifts
      if (i < W - 1) mosi = m_word[W-2-i];
      wait_half();
    end
    cs_n = 1'b1;
    repeat (8) @(negedge clk);
    check(!miso_oe, "MISO enabled while deselected");
    if (nbits == W) begin
      check(valid_pulses == n_prev + 1, "rx_valid did not pulse once");
      check(rx_data == m_word, $sformatf("slave got %h, master sent %h", rx_data, m_word));
      check(got == s_word, $sformatf("master got %h, slave sent %h", got, s_word));
    end else begin
      check(valid_pulses == n_prev, "rx_valid after a short transfer");
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    transfer(8'h5A, 8'hDE, W);
    transfer(8'hA5, 8'h3C, 4);
    transfer(8'h81, 8'h7E, W);
    for (int i = 0; i < 15; i++) transfer(W'($urandom), W'($urandom), W);
    half = 5;
    for (int i = 0; i < 10; i++) transfer(W'($urandom), W'($urandom), W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
