// clk_en_div: clock-enable divider.
//
// Produces a one-cycle pulse on `tick` every DIV cycles of `clk` while `run`
// is high; when `run` is low the counter is cleared, so the first tick comes
// exactly DIV cycles after `run` rises. The serial controllers use it to pace
// their bus clocks from the 50 MHz system clock: DIV = 7 gives the SPI half
// period (3.57 MHz serial clock), DIV = 32 the I2C quarter period
// (390.6 kHz SCL). Rather than toggling a derived clock, as a simple divider
// would, the bus clock is produced by the controllers as an ordinary
// registered output, so all logic stays in one clock domain.
module clk_en_div #(
  parameter int unsigned DIV = serial_pkg::SPI_HALF_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!run) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("clk_en_div: DIV must be at least 2");
endmodule
