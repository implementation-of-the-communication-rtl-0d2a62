// spi_master: SPI bus master with clock polarity 1.
//
// One transfer shifts WIDTH bits (a multiple of 8, 8 by default) out on MOSI
// and WIDTH bits in from MISO, most significant bit first. The serial clock
// CLK_3 idles high and is generated from the system clock: each half period
// lasts HALF_DIV system clocks (7 at 50 MHz, about 3.6 MHz). The slave is
// selected by driving its active-low chip select; the transfer ends with the
// rising edge of that select. As in the reference design the master puts
// its data on MOSI at the rising edge of CLK_3 (the first bit when CS falls)
// and samples MISO at the falling edge.
//
// Interface: pulse `start` for one cycle while `busy` is low, with `tx_data`
// and `ss_sel` valid. `done` pulses for one cycle when CS has returned high;
// `rx_data` then holds the received word until the next transfer ends.
//
// Timing: CS falls one cycle after `start`. Then 2*WIDTH+1 half periods
// follow: a set-up half period, WIDTH low/high CLK_3 pulses, and a hold half
// period, after which CS rises and `done` pulses. An 8-bit transfer takes
// 17*HALF_DIV + 2 system clocks from `start` to `done`.
// The number of chip selects (NUM_SS) follows the (3+N)-wire description of
// the bus; the reference board uses one slave. The set-up and hold half
// periods are this design's choice.
module spi_master #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned NUM_SS   = 1,
  parameter int unsigned HALF_DIV = serial_pkg::SPI_HALF_DIV
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // user side
  input  logic                      start,
  input  logic [WIDTH-1:0]          tx_data,
  input  logic [((NUM_SS > 1) ? $clog2(NUM_SS) : 1)-1:0] ss_sel,
  output logic [WIDTH-1:0]          rx_data,
  output logic                      busy,
  output logic                      done,
  // bus side
  output logic                      sclk,
  output logic [NUM_SS-1:0]         cs_n,
  output logic                      mosi,
  input  logic                      miso
);
  localparam int unsigned BW = $clog2(WIDTH + 1);

  typedef enum logic [1:0] {
    S_IDLE,   // CS high, CLK_3 high
    S_HIGH,   // CLK_3 high: set-up or second half of a bit
    S_LOW,    // CLK_3 low: first half of a bit, MISO sampled on entry
    S_HOLD    // CLK_3 high after the last bit, before CS rises
  } state_e;

  state_e           state;
  logic             tick;
  logic [WIDTH-1:0] tx_sh;
  logic [WIDTH-1:0] rx_sh;
  logic [BW-1:0]    nbits;    // falling edges seen in this transfer

  clk_en_div #(.DIV(HALF_DIV)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .run  (state != S_IDLE),
    .tick (tick)
  );

  assign busy = (state != S_IDLE);
  assign mosi = tx_sh[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sclk    <= 1'b1;
      cs_n    <= '1;
      tx_sh   <= '1;
      rx_sh   <= '0;
      rx_data <= '0;
      nbits   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sclk <= 1'b1;
          if (start) begin
            tx_sh         <= tx_data;   // first bit valid when CS falls
            nbits         <= '0;
            cs_n          <= '1;
            cs_n[ss_sel]  <= 1'b0;
            state         <= S_HIGH;
          end
        end
        S_HIGH: if (tick) begin
          // falling edge: receive
          sclk  <= 1'b0;
          rx_sh <= {rx_sh[WIDTH-2:0], miso};
          nbits <= nbits + 1'b1;
          state <= S_LOW;
        end
        S_LOW: if (tick) begin
          // rising edge: transmit the next bit
          sclk <= 1'b1;
          if (nbits == BW'(WIDTH)) begin
            state <= S_HOLD;
          end else begin
            tx_sh <= {tx_sh[WIDTH-2:0], 1'b1};
            state <= S_HIGH;
          end
        end
        S_HOLD: if (tick) begin
          cs_n    <= '1;               // rising CS ends the transfer
          rx_data <= rx_sh;
          tx_sh   <= '1;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (WIDTH % 8 == 0 && WIDTH > 0)
      else $error("spi_master: WIDTH must be a multiple of 8");
    assert (HALF_DIV >= 5)
      else $error("spi_master: HALF_DIV below 5 leaves the slave synchroniser no margin");
  end

  // CLK_3 only moves while a slave is selected.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $changed(sclk) |-> busy && !(&cs_n));
endmodule
