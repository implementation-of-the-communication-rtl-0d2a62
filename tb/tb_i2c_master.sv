// tb_i2c_master: self-checking test of the I2C master against a behavioural
// slave on a pulled-up two-wire bus.
//
// The slave model answers to address 7'h1B. It watches for START, reads
// address and R/W on SCL rising edges, and drives SDA shortly after SCL
// falling edges: ACK for its address, ACK or NACK for a written byte as told,
// the byte to return for a read. A bus monitor counts SCL pulses and
// START/STOP conditions and measures the SCL period.
// SCL rises are counted: the STOP (or the final release) adds one to the
// bit clocks. Cases: write acknowledged (18 bits + STOP = 19 rises), address
// not acknowledged (9 + STOP = 10), written byte refused (18 + release,
// without STOP), read (slave byte returned, master answers NACK, STOP), and a write
// ending with a repeated START followed by a read. Each transfer's length in
// system clocks and the SCL period (4*QDIV) are checked.
module tb_i2c_master;
  import serial_pkg::*;

  localparam int unsigned QDIV = serial_pkg::I2C_QUARTER_DIV;
  localparam logic [6:0]  SLV  = 7'h1B;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cmd_valid = 1'b0;
  logic        cmd_ready;
  i2c_cmd_t    cmd;
  logic        done, busy;
  i2c_status_e status;
  logic [7:0]  rdata;
  logic        scl_oe, sda_oe, sda_rd;
  tri1         scl, sda;
  logic        slv_low = 1'b0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2c_master #(.QDIV(QDIV)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd),
    .done(done), .status(status), .rdata(rdata), .busy(busy),
    .scl_oe(scl_oe), .sda_oe(sda_oe), .sda_i(sda_rd)
  );
  od_iobuf u_scl (.drive_low(scl_oe), .rd(), .pad(scl));
  od_iobuf u_sda (.drive_low(sda_oe), .rd(sda_rd), .pad(sda));
  assign sda = slv_low ? 1'b0 : 1'bz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- bus monitor ----
  int  pulses = 0, starts = 0, stops = 0, bad_period = 0;
  int  cyc = 0, last_rise = -1;
  logic scl_d = 1'b1, sda_d = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (scl && !scl_d) begin
      pulses++;
      if (last_rise >= 0 && pulses > 1 && cyc - last_rise != int'(4 * QDIV)) bad_period++;
      last_rise = cyc;
    end
    if (scl && scl_d && sda_d && !sda) starts++;
    if (scl && scl_d && !sda_d && sda) stops++;
    scl_d = scl;
    sda_d = sda;
  end

  // ---- behavioural slave ----
  logic [7:0] slv_addr_rw, slv_wbyte;
  logic       slv_mack;
  task automatic slave(input logic [7:0] rd_byte, input bit ack_w);
    logic hit;
    @(negedge sda iff scl);                       // START or repeated START
    for (int i = 7; i >= 0; i--) @(posedge scl) slv_addr_rw[i] = sda;
    hit = (slv_addr_rw[7:1] == SLV);
    @(negedge scl); #2 slv_low = hit;             // address ACK
    @(negedge scl); #2 slv_low = 1'b0;
    if (!hit) return;
    if (!slv_addr_rw[0]) begin
      for (int i = 7; i >= 0; i--) @(posedge scl) slv_wbyte[i] = sda;
      @(negedge scl); #2 slv_low = ack_w;
      @(negedge scl); #2 slv_low = 1'b0;
    end else begin
      slv_low = !rd_byte[7];
      for (int i = 6; i >= 0; i--) begin
        @(negedge scl); #2 slv_low = !rd_byte[i];
      end
      @(negedge scl); #2 slv_low = 1'b0;
      @(posedge scl) slv_mack = !sda;
    end
  endtask

  // Issue one command and wait for `done`; returns the cycles taken.
  task automatic run_cmd(input logic [6:0] addr, input i2c_rw_e rw, input logic [7:0] wdata,
                         input bit restart, output int cycles);
    cycles = 0;
    @(negedge clk);
    cmd       = '{addr: addr, rw: rw, wdata: wdata, restart: restart};
    cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done && cycles < 20000) begin
      @(negedge clk);
      cycles++;
    end
    check(done, "done never came");
  endtask

  task automatic reset_counts();
    pulses = 0; starts = 0; stops = 0; bad_period = 0; last_rise = -1;
  endtask

  // Cycles from command to done: n slots of four quarters, plus pipeline.
  function automatic bit len_ok(int cycles, int slots);
    return cycles >= slots * 4 * int'(QDIV) && cycles <= slots * 4 * int'(QDIV) + 4;
  endfunction

  int n;
  initial begin
    cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(scl && sda && cmd_ready, "bus not idle after reset");

    // 1. write acknowledged
    reset_counts();
    fork slave(8'h00, 1'b1); join_none
    run_cmd(SLV, I2C_WRITE, 8'h5A, 1'b0, n);
    check(status == I2C_OK, "write: status");
    check(slv_addr_rw == {SLV, 1'b0}, "write: address byte");
    check(slv_wbyte == 8'h5A, $sformatf("write: slave got %h", slv_wbyte));
    check(pulses == 19, $sformatf("write: %0d SCL rises", pulses));   // 18 bits + STOP
    check(starts == 1 && stops == 1, "write: START/STOP count");
    check(bad_period == 0, "write: SCL period");
    check(len_ok(n, 20), $sformatf("write: %0d cycles", n));
    repeat (20) @(negedge clk);
    check(scl && sda, "write: bus not released");

    // 2. address not acknowledged
    reset_counts();
    fork slave(8'h00, 1'b1); join_none
    run_cmd(7'h2B, I2C_WRITE, 8'h5A, 1'b0, n);
    check(status == I2C_ADDR_NACK, "addr nack: status");
    check(pulses == 10, $sformatf("addr nack: %0d SCL rises", pulses)); // 9 bits + STOP
    check(stops == 1, "addr nack: STOP missing");
    check(len_ok(n, 11), $sformatf("addr nack: %0d cycles", n));
    repeat (20) @(negedge clk);
    check(scl && sda, "addr nack: bus not released");

    // 3. written byte refused
    reset_counts();
    fork slave(8'h00, 1'b0); join_none
    run_cmd(SLV, I2C_WRITE, 8'hC3, 1'b0, n);
    check(status == I2C_DATA_NACK, "data nack: status");
    check(len_ok(n, 19), $sformatf("data nack: %0d cycles", n));
    repeat (4) @(negedge clk);
    check(pulses == 19, $sformatf("data nack: %0d SCL rises", pulses));  // 18 bits + release
    check(stops == 0, "data nack: unexpected STOP");
    check(scl && sda, "data nack: lines not released");

    // 4. read
    reset_counts();
    fork slave(8'hDE, 1'b1); join_none
    run_cmd(SLV, I2C_READ, 8'h00, 1'b0, n);
    check(status == I2C_OK, "read: status");
    check(rdata == 8'hDE, $sformatf("read: got %h", rdata));
    check(slv_addr_rw == {SLV, 1'b1}, "read: address byte");
    check(!slv_mack, "read: master did not answer NACK");
    check(pulses == 19 && stops == 1, "read: SCL rises/STOP");
    check(len_ok(n, 20), $sformatf("read: %0d cycles", n));

    // 5. write with repeated START, then read
    repeat (50) @(negedge clk);
    reset_counts();
    fork slave(8'h00, 1'b1); join_none
    run_cmd(SLV, I2C_WRITE, 8'h3C, 1'b1, n);
    check(status == I2C_OK && slv_wbyte == 8'h3C, "restart: write");
    check(stops == 0, "restart: STOP before repeated START");
    check(len_ok(n, 19), $sformatf("restart write: %0d cycles", n));
    repeat (100) @(negedge clk);
    check(!scl && cmd_ready, "restart: SCL not held low");
    fork slave(8'h96, 1'b1); join_none
    run_cmd(SLV, I2C_READ, 8'h00, 1'b0, n);
    check(rdata == 8'h96 && status == I2C_OK, "restart: read");
    check(starts == 2 && stops == 1, $sformatf("restart: %0d START %0d STOP", starts, stops));
    check(len_ok(n, 20), $sformatf("restart read: %0d cycles", n));

    // 6. random writes and reads
    for (int i = 0; i < 6; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      fork slave(b, 1'b1); join_none
      run_cmd(SLV, (i % 2 == 1) ? I2C_READ : I2C_WRITE, b, 1'b0, n);
      check(status == I2C_OK && ((i % 2 == 1) ? rdata == b : slv_wbyte == b), "random transfer");
      repeat (20) @(negedge clk);
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
