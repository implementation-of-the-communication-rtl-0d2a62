// tb_serial_top: end-to-end test of serial_top at its default parameters.
//
// The I2C pins are joined by `tri1` nets, the pull-up resistors of the bus.
// The test replays the four bus situations the design was demonstrated with,
// then random traffic:
//   * SPI master writes a byte to the SPI slave while reading one back;
//   * I2C master addresses a slave that is not there: no ACK, STOP;
//   * I2C write acknowledged by the slave, STOP;
//   * I2C write whose byte the slave refuses: master releases the bus;
// plus an I2C read and a write ending in a repeated START followed by a
// read. Each mechanism is counted and must have happened at least once.
// SPI latency (17 half periods of 7 clocks, plus 2) and I2C transfer length
// (20 slots of 4*32 clocks for a full transfer) are checked against the
// default rates.
module tb_serial_top;
  import serial_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  // SPI
  logic        spi_start = 1'b0;
  logic [7:0]  spi_tx = '0;
  logic [0:0]  spi_ss_sel = '0;
  logic [7:0]  spi_rx, spis_tx = '0, spis_rx;
  logic        spi_busy, spi_done, spis_valid, spis_miso_oe;
  logic        spi_sclk, spi_mosi, spi_miso;
  logic [0:0]  spi_cs_n;
  // I2C
  logic        i2c_cmd_valid = 1'b0, i2c_cmd_ready, i2c_done, i2c_busy;
  i2c_cmd_t    i2c_cmd = '0;
  i2c_status_e i2c_status;
  logic [7:0]  i2c_rdata;
  logic [6:0]  i2cs_addr = 7'b0011011;
  logic        i2cs_ack_data = 1'b1;
  logic [7:0]  i2cs_tx = '0, i2cs_rx;
  logic        i2cs_rx_valid, i2cs_addr_hit, i2cs_rd_done, i2cs_master_ack;
  tri1         i2c_scl, i2c_sda;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_spi = 0, n_wr_ack = 0, n_addr_nack = 0, n_data_nack = 0, n_read = 0;
  int n_rstart = 0, n_start = 0, n_stop = 0, n_slave_rx = 0;

  always #10 clk = ~clk;   // 50 MHz

  serial_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // START / STOP monitor on the shared bus
  logic scl_d = 1'b1, sda_d = 1'b1;
  always @(posedge clk) begin
    if (i2c_scl && scl_d && sda_d && !i2c_sda) n_start++;
    if (i2c_scl && scl_d && !sda_d && i2c_sda) n_stop++;
    if (i2cs_rx_valid && rst_n) n_slave_rx++;
    scl_d = i2c_scl;
    sda_d = i2c_sda;
  end

  task automatic spi_xfer(input logic [7:0] m, input logic [7:0] s);
    int cyc;
    int v0;
    v0      = n_slave_rx;
    spis_tx = s;
    @(negedge clk);
    spi_tx    = m;
    spi_start = 1'b1;
    @(negedge clk);
    spi_start = 1'b0;
    cyc = 1;
    while (!spi_done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 17 * int'(SPI_HALF_DIV) + 2, $sformatf("SPI latency %0d", cyc));
    check(spi_rx == s, $sformatf("SPI master got %h, expected %h", spi_rx, s));
    repeat (6) @(negedge clk);   // slave sees CS rise through its synchroniser
    check(spis_rx == m, $sformatf("SPI slave got %h, expected %h", spis_rx, m));
    n_spi++;
  endtask

  task automatic i2c_xfer(input logic [6:0] addr, input i2c_rw_e rw, input logic [7:0] wd,
                          input bit restart, output int cyc);
    @(negedge clk);
    i2c_cmd       = '{addr: addr, rw: rw, wdata: wd, restart: restart};
    i2c_cmd_valid = 1'b1;
    @(negedge clk);
    i2c_cmd_valid = 1'b0;
    cyc = 1;
    while (!i2c_done && cyc < 20000) begin
      @(negedge clk);
      cyc++;
    end
    check(i2c_done, "I2C done never came");
  endtask

  function automatic bit len_ok(int cyc, int slots);
    return cyc >= slots * 4 * int'(I2C_QUARTER_DIV) && cyc <= slots * 4 * int'(I2C_QUARTER_DIV) + 5;
  endfunction

  int c, s0, rx0;
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(i2c_scl && i2c_sda && spi_cs_n[0] && spi_sclk, "buses not idle");

    // SPI master write (Fig. 1 situation)
    spi_xfer(8'h5A, 8'hDE);

    // I2C: address not acknowledged (Fig. 2 situation)
    s0 = n_stop;
    i2c_xfer(7'b0101011, I2C_WRITE, 8'h5A, 1'b0, c);
    check(i2c_status == I2C_ADDR_NACK && n_stop == s0 + 1, "I2C addr NACK");
    check(len_ok(c, 11), $sformatf("I2C addr NACK length %0d", c));
    if (i2c_status == I2C_ADDR_NACK) n_addr_nack++;

    // I2C: write acknowledged (Fig. 3 situation)
    rx0 = n_slave_rx;
    i2c_xfer(7'b0011011, I2C_WRITE, 8'b01011010, 1'b0, c);
    check(i2c_status == I2C_OK && i2cs_rx == 8'b01011010 && n_slave_rx == rx0 + 1, "I2C write");
    check(len_ok(c, 20), $sformatf("I2C write length %0d", c));
    if (i2c_status == I2C_OK) n_wr_ack++;

    // I2C: slave refuses the byte (Fig. 4 situation)
    i2cs_ack_data = 1'b0;
    s0 = n_stop;
    i2c_xfer(7'b0011011, I2C_WRITE, 8'hC3, 1'b0, c);
    repeat (10) @(negedge clk);
    check(i2c_status == I2C_DATA_NACK && n_stop == s0, "I2C data NACK");
    check(i2c_scl && i2c_sda, "I2C bus not released after data NACK");
    if (i2c_status == I2C_DATA_NACK) n_data_nack++;
    i2cs_ack_data = 1'b1;

    // I2C read
    i2cs_tx = 8'b11011110;
    i2c_xfer(7'b0011011, I2C_READ, 8'h00, 1'b0, c);
    check(i2c_status == I2C_OK && i2c_rdata == 8'b11011110, "I2C read");
    check(!i2cs_master_ack, "I2C read: master should answer NACK");
    if (i2c_rdata == 8'b11011110) n_read++;

    // I2C write, repeated START, read
    s0 = n_start;
    i2cs_tx = 8'h69;
    i2c_xfer(7'b0011011, I2C_WRITE, 8'h81, 1'b1, c);
    check(i2c_status == I2C_OK && i2cs_rx == 8'h81 && !i2c_scl, "I2C write before repeated START");
    repeat (200) @(negedge clk);
    i2c_xfer(7'b0011011, I2C_READ, 8'h00, 1'b0, c);
    check(i2c_rdata == 8'h69 && n_start == s0 + 2, "I2C read after repeated START");
    if (n_start == s0 + 2) n_rstart++;

    // random mixed traffic: SPI and I2C at the same time
    for (int i = 0; i < 8; i++) begin
      logic [7:0] a, b, d;
      a = 8'($urandom); b = 8'($urandom); d = 8'($urandom);
      i2cs_tx = d;
      fork
        spi_xfer(a, b);
        begin
          int cc;
          i2c_xfer(7'b0011011, (i % 2 == 1) ? I2C_READ : I2C_WRITE, d, 1'b0, cc);
          check(i2c_status == I2C_OK && ((i % 2 == 1) ? i2c_rdata == d : i2cs_rx == d),
                "random I2C transfer");
        end
      join
    end

    // every mechanism must have occurred
    check(n_spi > 0,       "no SPI transfer");
    check(n_addr_nack > 0, "no address NACK");
    check(n_wr_ack > 0,    "no acknowledged write");
    check(n_data_nack > 0, "no data NACK");
    check(n_read > 0,      "no read");
    check(n_rstart > 0,    "no repeated START");
    check(n_stop > 0,      "no STOP");
    $display("mechanisms: spi=%0d addr_nack=%0d write_ack=%0d data_nack=%0d read=%0d rstart=%0d start=%0d stop=%0d",
             n_spi, n_addr_nack, n_wr_ack, n_data_nack, n_read, n_rstart, n_start, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
