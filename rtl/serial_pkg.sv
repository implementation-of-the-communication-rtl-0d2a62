// serial_pkg: constants and types shared by the SPI and I2C controllers.
//
// The clock rates are those of the reference implementation: a 50 MHz board
// clock, an SPI serial clock of about 3.6 MHz and an I2C SCL of about 396 kHz.
// Dividers are rounded up so that the bus never runs faster than asked for.
// The I2C command word carries one transfer: a 7-bit slave address, the R/W
// bit, one data byte for a write, and whether to end with a repeated START
// instead of a STOP.
package serial_pkg;

  parameter int unsigned SYS_CLK_HZ  = 50_000_000;
  parameter int unsigned SPI_SCLK_HZ = 3_600_000;
  parameter int unsigned I2C_SCL_HZ  = 396_000;

  function automatic int unsigned ceil_div(int unsigned num, int unsigned den);
    return (num + den - 1) / den;
  endfunction

  // System clocks per half SPI clock period and per quarter SCL period.
  parameter int unsigned SPI_HALF_DIV = ceil_div(SYS_CLK_HZ, 2 * SPI_SCLK_HZ);
  parameter int unsigned I2C_QUARTER_DIV = ceil_div(SYS_CLK_HZ, 4 * I2C_SCL_HZ);

  // I2C R/W bit as it appears on the bus.
  typedef enum logic {
    I2C_WRITE = 1'b0,
    I2C_READ  = 1'b1
  } i2c_rw_e;

  typedef struct packed {
    logic [6:0] addr;     // 7-bit slave address
    i2c_rw_e    rw;       // direction of the data byte
    logic [7:0] wdata;    // byte sent by a write
    logic       restart;  // end with a repeated START and keep the bus
  } i2c_cmd_t;

  // Outcome of one I2C transfer, as seen by the master.
  typedef enum logic [1:0] {
    I2C_OK        = 2'd0,  // address and data acknowledged (or byte read)
    I2C_ADDR_NACK = 2'd1,  // no slave acknowledged the address: STOP sent
    I2C_DATA_NACK = 2'd2   // slave refused the written byte: bus released
  } i2c_status_e;

endpackage
