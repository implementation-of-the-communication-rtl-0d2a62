// tb_od_iobuf: checks the open-drain buffer on a pulled-up line.
//
// Two buffers share one `tri1` net, as two I2C devices share SDA. The line
// must read 1 only when neither pulls it low, both read-backs must follow
// the line, and an external driver pulling low must be visible on both.
module tb_od_iobuf;
  tri1  line;
  logic a, b, ext;
  logic ra, rb;
  int   checks = 0, failures = 0;

  assign line = ext ? 1'b0 : 1'bz;

  od_iobuf u_a (.drive_low(a), .rd(ra), .pad(line));
  od_iobuf u_b (.drive_low(b), .rd(rb), .pad(line));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {ext, a, b} = 3'(i);
      #10;
      checks++;
      if (line !== !(a | b | ext) || ra !== line || rb !== line) begin
        failures++;
        $display("FAIL: a=%b b=%b ext=%b line=%b ra=%b rb=%b", a, b, ext, line, ra, rb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
