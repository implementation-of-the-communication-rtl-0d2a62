// i2c_slave: I2C slave with a 7-bit address and one data byte per transfer.
//
// SCL and SDA are synchronised to the system clock and watched for events:
// SDA falling while SCL is high is a START (or repeated START), SDA rising
// while SCL is high is a STOP. After a START the slave reads the 7 address
// bits and the R/W bit on the rising edges of SCL. If the address equals
// `own_addr` it pulls SDA low for the acknowledge bit; otherwise it leaves
// SDA released (NACK) and ignores the bus until the next START.
// As in the reference design, the slave reads SDA on the rising edge of SCL
// and changes SDA just after the falling edge.
//   * Write: eight data bits are shifted in; `rx_data`/`rx_valid` present the
//     byte. The slave acknowledges it if `ack_data` is high, otherwise it
//     answers NACK. Either way it then waits for a STOP or START.
//   * Read: the slave shifts `tx_data` out, most significant bit first, then
//     releases SDA and reads the master's ACK/NACK into `master_ack`.
// Only one byte is handled per transfer, as in the reference design.
//
// Interface: `sda_oe` high pulls SDA low through an open-drain buffer;
// `scl_i`/`sda_i` are the pad levels. The slave never drives SCL (no clock
// stretching). `addr_hit` pulses when the address matched, `rd_done` when a
// read byte has been sent and the master's answer is in `master_ack`
// (1 = ACK). SDA changes two to three system clocks after SCL falls, so SCL
// low time must exceed that (it is 64 clocks at 390 kHz).
module i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  // user side
  input  logic [6:0] own_addr,
  input  logic       ack_data,
  input  logic [7:0] tx_data,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       addr_hit,
  output logic       rd_done,
  output logic       master_ack,
  // bus side
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_oe
);
  typedef enum logic [2:0] {
    S_IDLE,     // not addressed: wait for a START
    S_ADDR,     // shifting in address and R/W
    S_AACK,     // driving ACK for the address
    S_WDATA,    // shifting in the written byte
    S_WACK,     // driving ACK/NACK for the written byte
    S_RDATA,    // shifting out the read byte
    S_MACK      // reading the master's ACK/NACK
  } state_e;

  state_e     state;
  logic       scl_s, sda_s, scl_q, sda_q;
  logic [3:0] nbits;     // rising SCL edges in the current byte
  logic [7:0] sh;
  logic       rw_q;

  sync2 #(.RESET_VAL(1'b1)) u_sync_scl (.clk(clk), .rst_n(rst_n), .d(scl_i), .q(scl_s));
  sync2 #(.RESET_VAL(1'b1)) u_sync_sda (.clk(clk), .rst_n(rst_n), .d(sda_i), .q(sda_s));

  wire scl_rise = !scl_q &&  scl_s;
  wire scl_fall =  scl_q && !scl_s;
  wire start_c  =  scl_q &&  scl_s && sda_q && !sda_s;
  wire stop_c   =  scl_q &&  scl_s && !sda_q && sda_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      scl_q      <= 1'b1;
      sda_q      <= 1'b1;
      nbits      <= '0;
      sh         <= '0;
      rw_q       <= 1'b0;
      sda_oe     <= 1'b0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      addr_hit   <= 1'b0;
      rd_done    <= 1'b0;
      master_ack <= 1'b0;
    end else begin
      scl_q    <= scl_s;
      sda_q    <= sda_s;
      rx_valid <= 1'b0;
      addr_hit <= 1'b0;
      rd_done  <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        nbits  <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: sda_oe <= 1'b0;
          S_ADDR: begin
            if (scl_rise) begin
              sh    <= {sh[6:0], sda_s};
              nbits <= nbits + 1'b1;
            end
            if (scl_fall && nbits == 4'd8) begin
              if (sh[7:1] == own_addr) begin
                rw_q     <= sh[0];
                sda_oe   <= 1'b1;          // ACK
                addr_hit <= 1'b1;
                state    <= S_AACK;
              end else begin
                state    <= S_IDLE;        // NACK: leave SDA released
              end
            end
          end
          S_AACK: if (scl_fall) begin
            nbits <= '0;
            if (rw_q) begin
              sh     <= {tx_data[6:0], 1'b1};
              sda_oe <= !tx_data[7];
              state  <= S_RDATA;
            end else begin
              sda_oe <= 1'b0;
              state  <= S_WDATA;
            end
          end
          S_WDATA: begin
            if (scl_rise) begin
              sh    <= {sh[6:0], sda_s};
              nbits <= nbits + 1'b1;
            end
            if (scl_fall && nbits == 4'd8) begin
              rx_data  <= sh;
              rx_valid <= 1'b1;
              sda_oe   <= ack_data;
              state    <= S_WACK;
            end
          end
          S_WACK: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= S_IDLE;              // one byte per transfer
          end
          S_RDATA: begin
            if (scl_rise) nbits <= nbits + 1'b1;
            if (scl_fall) begin
              if (nbits == 4'd8) begin
                sda_oe <= 1'b0;            // release for the master's answer
                state  <= S_MACK;
              end else begin
                sda_oe <= !sh[7];
                sh     <= {sh[6:0], 1'b1};
              end
            end
          end
          S_MACK: if (scl_rise) begin
            master_ack <= !sda_s;
            rd_done    <= 1'b1;
            state      <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The slave only changes SDA while SCL is low.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $rose(sda_oe) |-> !scl_s);
endmodule
