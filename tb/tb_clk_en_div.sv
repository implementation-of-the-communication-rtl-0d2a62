// tb_clk_en_div: self-checking test of the clock-enable divider.
//
// Runs the divider at two ratios (the SPI half period, 7, and the I2C
// quarter period, 32). For each it checks that no tick appears while `run`
// is low, that the first tick comes DIV cycles after `run` rises, and that
// the following ticks are exactly DIV cycles apart. Dropping `run` must restart the
// phase.
module tb_clk_en_div;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run7 = 1'b0, run32 = 1'b0;
  logic tick7, tick32;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_en_div #(.DIV(7))  dut7  (.clk(clk), .rst_n(rst_n), .run(run7),  .tick(tick7));
  clk_en_div #(.DIV(32)) dut32 (.clk(clk), .rst_n(rst_n), .run(run32), .tick(tick32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure intervals between ticks for one divider.
  task automatic measure(input int div, input int periods);
    int cyc, last, n;
    cyc = 0; last = 0; n = 0;
    @(negedge clk);
    if (div == 7) run7 = 1'b1; else run32 = 1'b1;
    while (n < periods) begin
      @(negedge clk);
      cyc++;
      if ((div == 7 && tick7) || (div == 32 && tick32)) begin
        check(cyc - last == div, $sformatf("DIV=%0d tick %0d after %0d cycles", div, n, cyc - last));
        last = cyc;
        n++;
      end
      if (cyc > periods * div * 2) break;
    end
    check(n == periods, $sformatf("DIV=%0d saw %0d ticks", div, n));
    run7 = 1'b0; run32 = 1'b0;
    @(negedge clk);
    repeat (3 * div) begin
      @(negedge clk);
      check(!tick7 && !tick32, "tick while run is low");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) begin
      @(negedge clk);
      check(!tick7 && !tick32, "tick before run");
    end
    measure(7, 10);
    measure(32, 6);
    measure(7, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
