// i2c_master: single-master I2C controller for one-byte transfers.
//
// A transfer is: START, 7-bit slave address, R/W bit, acknowledge from the
// slave, one data byte (sent by the master for a write, by the slave for a
// read), acknowledge, then STOP or a repeated START. The rules follow the
// reference design:
//   * address not acknowledged -> STOP, status I2C_ADDR_NACK;
//   * written byte not acknowledged -> SDA and SCL both released to high
//     impedance right after the NACK bit (no STOP), status I2C_DATA_NACK;
//   * byte read -> the master answers NACK (only one byte per transfer),
//     then STOP;
//   * with `cmd.restart` set, a successful transfer ends with SCL held low
//     and the next command begins with a repeated START.
// Multi-master arbitration and clock stretching are not implemented, as in
// the reference design; SCL is therefore driven but never read.
//
// Bus clock: each SCL period is four quarters of QDIV system clocks
// (QDIV = 32 at 50 MHz: 390.6 kHz, just under the 396 kHz of the reference
// and within fast mode). In a bit, SDA changes in the first quarter while SCL
// is low, SCL is high in the second and third quarters, SDA is sampled at the
// end of the third quarter, and SCL falls for the fourth. START, STOP and
// repeated START also take four quarters each. A one-byte write or read is
// 20 such slots (START, 18 SCL pulses, STOP); an address NACK is 11.
//
// Interface: `cmd_valid`/`cmd_ready` handshake accepts a command; `done`
// pulses when its transfer is over, with `status` and, for a read, `rdata`.
// Bus side: `scl_oe`/`sda_oe` high pull the line low through an open-drain
// buffer; `sda_i` is the level read back from the pad. The output levels are
// registered, so they follow the quarter sequence one system clock late.
module i2c_master
  import serial_pkg::*;
#(
  parameter int unsigned QDIV = serial_pkg::I2C_QUARTER_DIV
) (
  input  logic        clk,
  input  logic        rst_n,
  // user side
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  i2c_cmd_t    cmd,
  output logic        done,
  output i2c_status_e status,
  output logic [7:0]  rdata,
  output logic        busy,
  // bus side
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i
);
  typedef enum logic [2:0] {
    S_IDLE,     // bus released
    S_START,    // START condition
    S_BITS,     // one of the 18 data/ack bits
    S_STOP,     // STOP condition
    S_HOLD,     // SCL held low waiting for the repeated-START command
    S_RSTART    // repeated START condition
  } state_e;

  typedef enum logic [2:0] {
    F_ADDR,     // 7 address bits and R/W, master sends
    F_AACK,     // slave acknowledges the address
    F_WDATA,    // master sends the data byte
    F_WACK,     // slave acknowledges the data byte
    F_RDATA,    // slave sends the data byte
    F_MACK      // master answers the read byte (NACK: last byte)
  } field_e;

  state_e     state;
  field_e     field;
  logic [1:0] q;          // quarter of the current slot
  logic [2:0] bitn;       // bit within a byte
  logic [7:0] tx_sh;
  logic [7:0] rx_sh;
  i2c_cmd_t   cmd_q;
  logic       tick;
  logic       sda_s;
  logic       scl_lvl, sda_lvl;  // wanted line levels, 1 = released
  logic       tx_bit;

  clk_en_div #(.DIV(QDIV)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .run  (state != S_IDLE && state != S_HOLD),
    .tick (tick)
  );

  sync2 #(.RESET_VAL(1'b1)) u_sync_sda (.clk(clk), .rst_n(rst_n), .d(sda_i), .q(sda_s));

  assign cmd_ready = (state == S_IDLE) || (state == S_HOLD);
  assign busy      = !cmd_ready;

  // Bit the master puts on SDA in the current slot (1 = released).
  always_comb begin
    unique case (field)
      F_ADDR, F_WDATA: tx_bit = tx_sh[7];
      default:         tx_bit = 1'b1;   // ACK slots, read data, final NACK
    endcase
  end

  // Line levels for each quarter of each slot.
  always_comb begin
    scl_lvl = 1'b1;
    sda_lvl = 1'b1;
    unique case (state)
      S_IDLE:   begin scl_lvl = 1'b1;       sda_lvl = 1'b1;           end
      S_START:  begin scl_lvl = (q != 2'd3); sda_lvl = (q == 2'd0);    end
      S_BITS:   begin scl_lvl = (q == 2'd1) || (q == 2'd2); sda_lvl = tx_bit; end
      S_STOP:   begin scl_lvl = (q != 2'd0); sda_lvl = (q >= 2'd2);    end
      S_HOLD:   begin scl_lvl = 1'b0;       sda_lvl = 1'b1;           end
      S_RSTART: begin scl_lvl = (q == 2'd1) || (q == 2'd2); sda_lvl = (q <= 2'd1); end
      default:  ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
    end else begin
      scl_oe <= !scl_lvl;
      sda_oe <= !sda_lvl;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      field  <= F_ADDR;
      q      <= '0;
      bitn   <= '0;
      tx_sh  <= '1;
      rx_sh  <= '0;
      rdata  <= '0;
      cmd_q  <= '0;
      done   <= 1'b0;
      status <= I2C_OK;
    end else begin
      done <= 1'b0;
      if (cmd_ready && cmd_valid) begin
        cmd_q <= cmd;
        q     <= '0;
        state <= (state == S_HOLD) ? S_RSTART : S_START;
      end else if (tick) begin
        q <= q + 1'b1;
        unique case (state)
          S_START, S_RSTART: if (q == 2'd3) begin
            state <= S_BITS;
            field <= F_ADDR;
            bitn  <= '0;
            tx_sh <= {cmd_q.addr, cmd_q.rw};
          end
          S_BITS: begin
            if (q == 2'd2) rx_sh <= {rx_sh[6:0], sda_s};   // SCL high: sample
            if (q == 2'd3) begin                            // SCL low: next bit
              bitn  <= bitn + 1'b1;
              tx_sh <= {tx_sh[6:0], 1'b1};
              unique case (field)
                F_ADDR:  if (bitn == 3'd7) field <= F_AACK;
                F_AACK: begin
                  bitn <= '0;
                  if (rx_sh[0]) begin
                    status <= I2C_ADDR_NACK;
                    state  <= S_STOP;
                  end else if (cmd_q.rw == I2C_READ) begin
                    field <= F_RDATA;
                  end else begin
                    field <= F_WDATA;
                    tx_sh <= cmd_q.wdata;
                  end
                end
                F_WDATA: if (bitn == 3'd7) field <= F_WACK;
                F_WACK: begin
                  if (rx_sh[0]) begin
                    status <= I2C_DATA_NACK;
                    state  <= S_IDLE;      // release both lines
                    done   <= 1'b1;
                  end else begin
                    status <= I2C_OK;
                    if (cmd_q.restart) begin
                      state <= S_HOLD;
                      done  <= 1'b1;
                    end else begin
                      state <= S_STOP;
                    end
                  end
                end
                F_RDATA: if (bitn == 3'd7) begin
                  field <= F_MACK;
                  rdata <= rx_sh;
                end
                F_MACK: begin
                  status <= I2C_OK;
                  if (cmd_q.restart) begin
                    state <= S_HOLD;
                    done  <= 1'b1;
                  end else begin
                    state <= S_STOP;
                  end
                end
                default: ;
              endcase
            end
          end
          S_STOP: if (q == 2'd3) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // The master never drives SDA low while SCL is high except for a START.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_BITS && q inside {2'd1, 2'd2}) |-> $stable(sda_lvl));
endmodule
