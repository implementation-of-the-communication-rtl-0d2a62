// tb_i2c_rates: I2C master and slave together at standard-mode and
// fast-mode rates.
//
// The SCL rate is set only by the master's quarter-period divider QDIV. Two
// master/slave pairs run side by side on separate pulled-up buses: QDIV = 125
// (100 kHz, standard mode) and QDIV = 32 (390.6 kHz, the default, fast
// mode). On each bus the test writes a byte, reads one back, and checks the
// data, the SCL period (4*QDIV clocks) and that no period exceeds the mode's
// limit.
module tb_i2c_rates;
  import serial_pkg::*;

  localparam int NB = 2;
  localparam int QD[NB] = '{125, 32};
  localparam int LIMIT_HZ[NB] = '{100_000, 400_000};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        cmd_valid[NB];
  i2c_cmd_t    cmd[NB];
  logic        cmd_ready[NB], done[NB], busy[NB];
  i2c_status_e status[NB];
  logic [7:0]  rdata[NB], s_rx[NB], s_tx[NB];
  logic        s_valid[NB], s_hit[NB], s_rd[NB], s_mack[NB];
  int          period[NB];

  for (genvar g = 0; g < NB; g++) begin : g_bus
    tri1  scl, sda;
    logic m_scl_oe, m_sda_oe, m_sda_rd, s_sda_oe, s_sda_rd, s_scl_rd;
    i2c_master #(.QDIV(QD[g])) u_m (
      .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid[g]), .cmd_ready(cmd_ready[g]),
      .cmd(cmd[g]), .done(done[g]), .status(status[g]), .rdata(rdata[g]), .busy(busy[g]),
      .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .sda_i(m_sda_rd)
    );
    od_iobuf u_ms (.drive_low(m_scl_oe), .rd(), .pad(scl));
    od_iobuf u_md (.drive_low(m_sda_oe), .rd(m_sda_rd), .pad(sda));
    i2c_slave u_s (
      .clk(clk), .rst_n(rst_n), .own_addr(7'b0011011), .ack_data(1'b1), .tx_data(s_tx[g]),
      .rx_data(s_rx[g]), .rx_valid(s_valid[g]), .addr_hit(s_hit[g]), .rd_done(s_rd[g]),
      .master_ack(s_mack[g]), .scl_i(s_scl_rd), .sda_i(s_sda_rd), .sda_oe(s_sda_oe)
    );
    od_iobuf u_ss (.drive_low(1'b0), .rd(s_scl_rd), .pad(scl));
    od_iobuf u_sd (.drive_low(s_sda_oe), .rd(s_sda_rd), .pad(sda));

    // shortest SCL period between two rising edges inside a transfer
    int   cyc = 0, last = -1;
    logic scl_d = 1'b1;
    always @(posedge clk) begin
      cyc++;
      if (scl && !scl_d) begin
        if (last >= 0 && busy[g] && (period[g] == 0 || cyc - last < period[g]))
          period[g] = cyc - last;
        last = cyc;
      end
      if (!busy[g]) last = -1;
      scl_d = scl;
    end
  end

  task automatic xfer(input int b, input i2c_rw_e rw, input logic [7:0] d);
    int n;
    n = 0;
    @(negedge clk);
    cmd[b] = '{addr: 7'b0011011, rw: rw, wdata: d, restart: 1'b0};
    cmd_valid[b] = 1'b1;
    @(negedge clk);
    cmd_valid[b] = 1'b0;
    while (!done[b] && n < 100000) begin
      @(negedge clk);
      n++;
    end
    check(done[b] && status[b] == I2C_OK, $sformatf("bus %0d: transfer failed", b));
    check(n >= 80 * QD[b] && n <= 80 * QD[b] + 5, $sformatf("bus %0d: %0d cycles", b, n));
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      cmd_valid[b] = 1'b0; cmd[b] = '0; s_tx[b] = '0; period[b] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      logic [7:0] w, r;
      w = 8'($urandom); r = 8'($urandom);
      s_tx[b] = r;
      xfer(b, I2C_WRITE, w);
      check(s_rx[b] == w, $sformatf("bus %0d: slave got %h, expected %h", b, s_rx[b], w));
      xfer(b, I2C_READ, 8'h00);
      check(rdata[b] == r, $sformatf("bus %0d: master read %h, expected %h", b, rdata[b], r));
      check(period[b] == 4 * QD[b], $sformatf("bus %0d: SCL period %0d clocks", b, period[b]));
      check(50_000_000 / period[b] <= LIMIT_HZ[b],
            $sformatf("bus %0d: SCL %0d Hz above %0d Hz", b, 50_000_000 / period[b], LIMIT_HZ[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
