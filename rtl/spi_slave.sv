// spi_slave: SPI bus slave, companion of spi_master.
//
// The slave works in the system clock domain: CLK_3, CS and MOSI are passed
// through two-flop synchronisers and the clock edges are found by comparing
// successive samples. When CS falls the slave loads `tx_data` and puts its
// most significant bit on MISO; at every falling edge of CLK_3 it shifts MOSI
// in, and at every rising edge it puts the next bit on MISO, as in the
// reference design (receive on the falling edge, transmit on the rising
// edge). When CS rises the transfer ends: if exactly WIDTH bits arrived,
// `rx_data` is updated and `rx_valid` pulses for one cycle.
//
// `miso_oe` is high while the slave is selected; a board with several slaves
// uses it to tri-state MISO. The synchronisers delay every event by two to
// three system clocks, so the bus half period must be at least five system
// clocks (it is seven at the default rates). Synchronising to the system
// clock, rather than clocking from CLK_3, is this design's choice.
module spi_slave #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // user side
  input  logic [WIDTH-1:0] tx_data,
  output logic [WIDTH-1:0] rx_data,
  output logic             rx_valid,
  // bus side
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             mosi,
  output logic             miso,
  output logic             miso_oe
);
  localparam int unsigned BW = $clog2(WIDTH + 1);

  logic sclk_s, cs_n_s, mosi_s;
  logic sclk_q, cs_n_q;
  logic [WIDTH-1:0] tx_sh, rx_sh;
  logic [BW-1:0]    nbits;

  sync2 #(.RESET_VAL(1'b1)) u_sync_sclk (.clk(clk), .rst_n(rst_n), .d(sclk), .q(sclk_s));
  sync2 #(.RESET_VAL(1'b1)) u_sync_cs   (.clk(clk), .rst_n(rst_n), .d(cs_n), .q(cs_n_s));
  sync2 #(.RESET_VAL(1'b1)) u_sync_mosi (.clk(clk), .rst_n(rst_n), .d(mosi), .q(mosi_s));

  wire sel_fall  =  cs_n_q && !cs_n_s;
  wire sel_rise  = !cs_n_q &&  cs_n_s;
  wire sclk_fall =  sclk_q && !sclk_s && !cs_n_s;
  wire sclk_rise = !sclk_q &&  sclk_s && !cs_n_s;

  assign miso    = tx_sh[WIDTH-1];
  assign miso_oe = !cs_n_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q   <= 1'b1;
      cs_n_q   <= 1'b1;
      tx_sh    <= '1;
      rx_sh    <= '0;
      rx_data  <= '0;
      nbits    <= '0;
      rx_valid <= 1'b0;
    end else begin
      sclk_q   <= sclk_s;
      cs_n_q   <= cs_n_s;
      rx_valid <= 1'b0;
      if (sel_fall) begin
        tx_sh <= tx_data;
        nbits <= '0;
      end else if (sel_rise) begin
        if (nbits == BW'(WIDTH)) begin
          rx_data  <= rx_sh;
          rx_valid <= 1'b1;
        end
        tx_sh <= '1;
      end else begin
        if (sclk_fall) begin
          rx_sh <= {rx_sh[WIDTH-2:0], mosi_s};
          if (nbits != BW'(WIDTH)) nbits <= nbits + 1'b1;
        end
        if (sclk_rise) tx_sh <= {tx_sh[WIDTH-2:0], 1'b1};
      end
    end
  end

  initial assert (WIDTH % 8 == 0 && WIDTH > 0)
    else $error("spi_slave: WIDTH must be a multiple of 8");
endmodule
