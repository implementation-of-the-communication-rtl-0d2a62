// sync2: two-flop synchroniser for one asynchronous input.
//
// Brings a bus line (SCLK, CS, MOSI, SCL, SDA) into the system clock domain.
// The output follows the input by two clock cycles. RESET_VAL is the
// value held during reset, the idle level of the line.
module sync2 #(
  parameter logic RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
