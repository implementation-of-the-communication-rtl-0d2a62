// serial_top: SPI and I2C master/slave pairs sharing one system clock.
//
// The SPI half connects spi_master to spi_slave over the four bus wires
// (CLK_3, CS, MOSI, MISO); these are also brought out so they can be probed.
// The I2C half puts i2c_master and i2c_slave on the same two-wire bus
// through open-drain tri-state buffers: the `i2c_scl` and `i2c_sda` pins are
// that bus, and need external pull-up resistors (in simulation, `tri1`
// nets). The reference implementation placed each master and each slave on
// its own FPGA; joining them here changes nothing on the wires, and the bus
// pins still accept an external I2C device.
//
// The SPI slave's chip select is the master's first select line; further
// select lines are brought out for other slaves. Each half keeps the user
// interface of its blocks: see spi_master, spi_slave, i2c_master and
// i2c_slave for the handshakes and timing.
module serial_top
  import serial_pkg::*;
#(
  parameter int unsigned SPI_WIDTH  = 8,
  parameter int unsigned SPI_NUM_SS = 1,
  parameter int unsigned SPI_DIV    = serial_pkg::SPI_HALF_DIV,
  parameter int unsigned I2C_DIV    = serial_pkg::I2C_QUARTER_DIV
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // SPI master user side
  input  logic                            spi_start,
  input  logic [SPI_WIDTH-1:0]            spi_tx,
  input  logic [((SPI_NUM_SS > 1) ? $clog2(SPI_NUM_SS) : 1)-1:0] spi_ss_sel,
  output logic [SPI_WIDTH-1:0]            spi_rx,
  output logic                            spi_busy,
  output logic                            spi_done,
  // SPI slave user side
  input  logic [SPI_WIDTH-1:0]            spis_tx,
  output logic [SPI_WIDTH-1:0]            spis_rx,
  output logic                            spis_valid,
  output logic                            spis_miso_oe,
  // SPI bus, for probing and further slaves
  output logic                            spi_sclk,
  output logic [SPI_NUM_SS-1:0]           spi_cs_n,
  output logic                            spi_mosi,
  output logic                            spi_miso,
  // I2C master user side
  input  logic                            i2c_cmd_valid,
  output logic                            i2c_cmd_ready,
  input  i2c_cmd_t                        i2c_cmd,
  output logic                            i2c_done,
  output i2c_status_e                     i2c_status,
  output logic [7:0]                      i2c_rdata,
  output logic                            i2c_busy,
  // I2C slave user side
  input  logic [6:0]                      i2cs_addr,
  input  logic                            i2cs_ack_data,
  input  logic [7:0]                      i2cs_tx,
  output logic [7:0]                      i2cs_rx,
  output logic                            i2cs_rx_valid,
  output logic                            i2cs_addr_hit,
  output logic                            i2cs_rd_done,
  output logic                            i2cs_master_ack,
  // I2C bus (open drain, pulled up off chip)
  inout  wire                             i2c_scl,
  inout  wire                             i2c_sda
);
  // ---------------- SPI ----------------

  spi_master #(.WIDTH(SPI_WIDTH), .NUM_SS(SPI_NUM_SS), .HALF_DIV(SPI_DIV)) u_spi_m (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (spi_start),
    .tx_data(spi_tx),
    .ss_sel (spi_ss_sel),
    .rx_data(spi_rx),
    .busy   (spi_busy),
    .done   (spi_done),
    .sclk   (spi_sclk),
    .cs_n   (spi_cs_n),
    .mosi   (spi_mosi),
    .miso   (spi_miso)
  );

  spi_slave #(.WIDTH(SPI_WIDTH)) u_spi_s (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_data (spis_tx),
    .rx_data (spis_rx),
    .rx_valid(spis_valid),
    .sclk    (spi_sclk),
    .cs_n    (spi_cs_n[0]),
    .mosi    (spi_mosi),
    .miso    (spi_miso),
    .miso_oe (spis_miso_oe)
  );

  // ---------------- I2C ----------------
  logic m_scl_oe, m_sda_oe, m_sda_rd;
  logic s_sda_oe, s_sda_rd, s_scl_rd;

  i2c_master #(.QDIV(I2C_DIV)) u_i2c_m (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd_valid(i2c_cmd_valid),
    .cmd_ready(i2c_cmd_ready),
    .cmd      (i2c_cmd),
    .done     (i2c_done),
    .status   (i2c_status),
    .rdata    (i2c_rdata),
    .busy     (i2c_busy),
    .scl_oe   (m_scl_oe),
    .sda_oe   (m_sda_oe),
    .sda_i    (m_sda_rd)
  );

  od_iobuf u_m_scl (.drive_low(m_scl_oe), .rd(), .pad(i2c_scl));  // no clock stretching: SCL not read back
  od_iobuf u_m_sda (.drive_low(m_sda_oe), .rd(m_sda_rd), .pad(i2c_sda));

  i2c_slave u_i2c_s (
    .clk       (clk),
    .rst_n     (rst_n),
    .own_addr  (i2cs_addr),
    .ack_data  (i2cs_ack_data),
    .tx_data   (i2cs_tx),
    .rx_data   (i2cs_rx),
    .rx_valid  (i2cs_rx_valid),
    .addr_hit  (i2cs_addr_hit),
    .rd_done   (i2cs_rd_done),
    .master_ack(i2cs_master_ack),
    .scl_i     (s_scl_rd),
    .sda_i     (s_sda_rd),
    .sda_oe    (s_sda_oe)
  );

  // The slave never pulls SCL: its SCL buffer is input only.
  od_iobuf u_s_scl (.drive_low(1'b0),     .rd(s_scl_rd), .pad(i2c_scl));
  od_iobuf u_s_sda (.drive_low(s_sda_oe), .rd(s_sda_rd), .pad(i2c_sda));
endmodule
