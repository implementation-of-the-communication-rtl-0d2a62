// tb_spi_master: self-checking test of the SPI master against a
// behavioural slave.
//
// The slave model follows the bus rules directly: on CS falling it puts the
// most significant bit of its word on MISO, it samples MOSI on every falling
// edge of the serial clock and moves MISO on every rising edge. For a set of
// random words the test checks what each side received, that the clock idles
// high and makes exactly WIDTH pulses per transfer, that every half period
// lasts HALF_DIV system clocks (the first one HALF_DIV+1), and that `done`
// comes 17*HALF_DIV + 2 cycles after `start` for 8-bit words. A second
// master with two chip selects checks that only the chosen select goes low.
module tb_spi_master;
  localparam int unsigned W   = 8;
  localparam int unsigned DIV = serial_pkg::SPI_HALF_DIV;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [W-1:0] tx_data = '0;
  logic [0:0]   ss_sel = '0;
  logic [W-1:0] rx_data;
  logic         busy, done;
  logic         sclk, mosi, miso;
  logic [0:0]   cs_n;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_master #(.WIDTH(W), .NUM_SS(1), .HALF_DIV(DIV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .tx_data(tx_data), .ss_sel(ss_sel),
    .rx_data(rx_data), .busy(busy), .done(done),
    .sclk(sclk), .cs_n(cs_n), .mosi(mosi), .miso(miso)
  );

  // Second master with two chip selects, for the select decoding.
  logic         start2 = 1'b0;
  logic [0:0]   ss_sel2 = '0;
  logic [1:0]   cs2_n;
  logic         busy2, done2, sclk2, mosi2;
  logic [W-1:0] rx2;
  int           low_seen[2];
  spi_master #(.WIDTH(W), .NUM_SS(2), .HALF_DIV(DIV)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start2), .tx_data(8'hA5), .ss_sel(ss_sel2),
    .rx_data(rx2), .busy(busy2), .done(done2),
    .sclk(sclk2), .cs_n(cs2_n), .mosi(mosi2), .miso(1'b0)
  );
  always @(posedge clk) if (rst_n) begin
    if (!cs2_n[0]) low_seen[0]++;
    if (!cs2_n[1]) low_seen[1]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- behavioural slave ----
  logic [W-1:0] slv_tx, slv_sh, slv_rx;
  int           pulses;
  always @(negedge cs_n[0]) begin
    slv_sh = slv_tx;
    miso   = slv_sh[W-1];
    pulses = 0;
  end
  always @(negedge sclk) if (!cs_n[0]) slv_rx = {slv_rx[W-2:0], mosi};
  always @(posedge sclk) if (!cs_n[0]) begin
    pulses++;
    slv_sh = {slv_sh[W-2:0], 1'b0};
    miso   = slv_sh[W-1];
  end

  // ---- half-period measurement in system clocks ----
  int  since_edge, n_edges, bad_half;
  logic sclk_d;
  always @(posedge clk) begin
    if (!cs_n[0] && sclk != sclk_d) begin
      n_edges++;
      if (n_edges > 1 && since_edge != int'(DIV)) bad_half++;
      since_edge = 1;
    end else begin
      since_edge++;
    end
    if (cs_n[0] && sclk !== 1'b1) bad_half++;   // idle level must be high
    sclk_d = sclk;
  end

  task automatic transfer(input logic [W-1:0] m_word, input logic [W-1:0] s_word);
    int cyc;
    slv_tx   = s_word;
    n_edges  = 0;
    bad_half = 0;
    @(negedge clk);
    tx_data = m_word;
    start   = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(done, "done never came");
    check(cyc == int'(17 * DIV + 2), $sformatf("latency %0d cycles, expected %0d", cyc, 17 * DIV + 2));
    check(rx_data == s_word, $sformatf("master got %h, slave sent %h", rx_data, s_word));
    check(slv_rx == m_word, $sformatf("slave got %h, master sent %h", slv_rx, m_word));
    check(pulses == W, $sformatf("%0d clock pulses", pulses));
    check(n_edges == 2 * W, $sformatf("%0d clock edges", n_edges));
    check(bad_half == 0, "clock half period or idle level wrong");
    check(cs_n[0] == 1'b1 && !busy, "CS not released after done");
  endtask

  initial begin
    miso = 1'b1;
    slv_rx = '0;
    sclk_d = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(cs_n[0] && sclk, "bus not idle after reset");
    transfer(8'h5A, 8'hDE);   // the patterns of the reference listing
    transfer(8'h00, 8'hFF);
    transfer(8'hFF, 8'h00);
    for (int i = 0; i < 20; i++) transfer(W'($urandom), W'($urandom));
    // chip select decoding with two slaves
    for (int sel = 0; sel < 2; sel++) begin
      low_seen[0] = 0; low_seen[1] = 0;
      @(negedge clk);
      ss_sel2 = 1'(sel);
      start2  = 1'b1;
      @(negedge clk);
      start2 = 1'b0;
      while (!done2) @(negedge clk);
      check(low_seen[sel] == int'(17 * DIV + 1) && low_seen[1-sel] == 0,
            $sformatf("select %0d: CS low for %0d/%0d cycles", sel, low_seen[0], low_seen[1]));
      check(rx2 == 8'h00, "second master: MISO held low should read 00");
    end
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
