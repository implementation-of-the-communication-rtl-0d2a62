// tb_i2c_slave: self-checking test of the I2C slave against a behavioural
// master on a pulled-up two-wire bus.
//
// The master model produces START, STOP and repeated START, clocks bits with
// a quarter period of Q system clocks, changes SDA in the middle of SCL low
// and samples SDA just before SCL falls. Cases: write to the slave's address
// (ACK, byte delivered on `rx_data` with one `rx_valid` pulse, byte ACKed),
// write with `ack_data` low (byte NACKed), a wrong address (no ACK, no
// activity at the user side), read (slave returns `tx_data`, reports the
// master's NACK/ACK), a repeated START between two transfers, and a STOP
// in the middle of a byte, after which the slave must answer again.
module tb_i2c_slave;
  localparam int Q = serial_pkg::I2C_QUARTER_DIV;
  localparam logic [6:0] ADDR = 7'b0011011;   // address used by the reference master

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       ack_data = 1'b1;
  logic [7:0] tx_data = 8'h00;
  logic [7:0] rx_data;
  logic       rx_valid, addr_hit, rd_done, master_ack;
  logic       s_sda_oe, s_sda_rd, s_scl_rd;
  logic       m_scl_low = 1'b0, m_sda_low = 1'b0;
  tri1        scl, sda;
  int         checks = 0, failures = 0;
  int         n_valid = 0, n_hit = 0, n_rd = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) n_valid++;
    if (addr_hit) n_hit++;
    if (rd_done)  n_rd++;
  end

  i2c_slave dut (
    .clk(clk), .rst_n(rst_n), .own_addr(ADDR), .ack_data(ack_data), .tx_data(tx_data),
    .rx_data(rx_data), .rx_valid(rx_valid), .addr_hit(addr_hit), .rd_done(rd_done),
    .master_ack(master_ack), .scl_i(s_scl_rd), .sda_i(s_sda_rd), .sda_oe(s_sda_oe)
  );
  od_iobuf u_scl (.drive_low(1'b0),     .rd(s_scl_rd), .pad(scl));
  od_iobuf u_sda (.drive_low(s_sda_oe), .rd(s_sda_rd), .pad(sda));
  assign scl = m_scl_low ? 1'b0 : 1'bz;
  assign sda = m_sda_low ? 1'b0 : 1'bz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic quarter();
    repeat (Q) @(negedge clk);
  endtask

  // ---- behavioural master ----
  task automatic m_start();          // from idle: SDA falls while SCL high
    m_sda_low = 1'b0; m_scl_low = 1'b0; quarter();
    m_sda_low = 1'b1; quarter(); quarter();
    m_scl_low = 1'b1; quarter();
  endtask
  task automatic m_rstart();         // from SCL low
    m_sda_low = 1'b0; quarter();
    m_scl_low = 1'b0; quarter();
    m_sda_low = 1'b1; quarter();
    m_scl_low = 1'b1; quarter();
  endtask
  task automatic m_stop();           // from SCL low
    m_sda_low = 1'b1; quarter();
    m_scl_low = 1'b0; quarter();
    m_sda_low = 1'b0; quarter(); quarter();
  endtask
  task automatic m_bit(input logic b, output logic r);
    m_sda_low = !b; quarter();
    m_scl_low = 1'b0; quarter(); quarter();
    r = sda;
    m_scl_low = 1'b1; quarter();
  endtask
  task automatic m_byte(input logic [7:0] b, output logic [7:0] r);
    for (int i = 7; i >= 0; i--) m_bit(b[i], r[i]);
  endtask

  logic [7:0] r8;
  logic       ack;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);

    // 1. write, acknowledged
    m_start();
    m_byte({ADDR, 1'b0}, r8); m_bit(1'b1, ack);
    check(ack == 1'b0, "write: address not acknowledged");
    check(n_hit == 1, "write: addr_hit");
    m_byte(8'h5A, r8); m_bit(1'b1, ack);
    check(ack == 1'b0, "write: data not acknowledged");
    check(n_valid == 1 && rx_data == 8'h5A, $sformatf("write: rx_data %h", rx_data));
    m_stop();
    check(sda && !s_sda_oe, "write: SDA not released");

    // 2. write, refused
    ack_data = 1'b0;
    m_start();
    m_byte({ADDR, 1'b0}, r8); m_bit(1'b1, ack);
    check(ack == 1'b0, "refuse: address not acknowledged");
    m_byte(8'hC3, r8); m_bit(1'b1, ack);
    check(ack == 1'b1, "refuse: data acknowledged");
    check(n_valid == 2 && rx_data == 8'hC3, "refuse: byte still delivered");
    m_stop();
    ack_data = 1'b1;

    // 3. wrong address
    m_start();
    m_byte({7'b0101011, 1'b0}, r8); m_bit(1'b1, ack);
    check(ack == 1'b1, "wrong address acknowledged");
    m_byte(8'hFF, r8); m_bit(1'b1, ack);
    check(ack == 1'b1 && n_valid == 2 && n_hit == 2, "wrong address: slave active");
    m_stop();

    // 4. read, master answers NACK
    tx_data = 8'hDE;
    m_start();
    m_byte({ADDR, 1'b1}, r8); m_bit(1'b1, ack);
    check(ack == 1'b0, "read: address not acknowledged");
    m_byte(8'hFF, r8); m_bit(1'b1, ack);
    check(r8 == 8'hDE, $sformatf("read: got %h", r8));
    repeat (4) @(negedge clk);
    check(n_rd == 1 && !master_ack, "read: master NACK not seen");
    m_stop();

    // 5. write, repeated START, read answered with ACK
    tx_data = 8'h96;
    m_start();
    m_byte({ADDR, 1'b0}, r8); m_bit(1'b1, ack);
    m_byte(8'h3C, r8); m_bit(1'b1, ack);
    check(ack == 1'b0 && rx_data == 8'h3C, "restart: write");
    m_rstart();
    m_byte({ADDR, 1'b1}, r8); m_bit(1'b1, ack);
    check(ack == 1'b0, "restart: address not acknowledged");
    m_byte(8'hFF, r8); m_bit(1'b0, ack);
    check(r8 == 8'h96, $sformatf("restart: read %h", r8));
    repeat (4) @(negedge clk);
    check(n_rd == 2 && master_ack, "restart: master ACK not seen");
    m_stop();

    // 6. STOP in the middle of the address, then a normal write
    m_start();
    m_bit(1'b0, ack); m_bit(1'b0, ack); m_bit(1'b1, ack);
    m_stop();
    m_start();
    m_byte({ADDR, 1'b0}, r8); m_bit(1'b1, ack);
    check(ack == 1'b0, "after abort: address not acknowledged");
    m_byte(8'hA7, r8); m_bit(1'b1, ack);
    check(ack == 1'b0 && rx_data == 8'hA7, "after abort: write");
    m_stop();

    // 7. random reads and writes
    for (int i = 0; i < 6; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      tx_data = b;
      m_start();
      m_byte({ADDR, 1'(i % 2 == 1)}, r8); m_bit(1'b1, ack);
      check(ack == 1'b0, "random: address");
      m_byte((i % 2 == 1) ? 8'hFF : b, r8); m_bit(1'b1, ack);
      check((i % 2 == 1) ? r8 == b : rx_data == b, "random: data");
      m_stop();
    end
    check(!s_sda_oe && sda, "bus not released at the end");

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
