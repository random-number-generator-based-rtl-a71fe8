// tb_baud_generator: checks that the baud timer ticks every 434 clocks
// (50 MHz / 115200) and that clear restarts the bit period.
module tb_baud_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CLKS_PER_BIT = 50_000_000 / 115_200;

  logic clk = 1'b0;
  logic rst;
  logic clear;
  logic tick;
  int   checks = 0;
  int   failures = 0;

  baud_generator dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs change and outputs are sampled on the falling edge, half a
  // clock away from the edges the timer counts.
  initial begin
    int last, cyc, gap, n;
    checks++;
    if (CLKS_PER_BIT != 434) begin failures++; $display("clocks per bit %0d", CLKS_PER_BIT); end
    rst = 1'b1; clear = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    // After the last clear edge the count starts at 0; tick is high in the
    // cycle whose closing edge ends the bit period: 433 cycles later.
    cyc = 0; last = -1; n = 0;
    while (n < 10) begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        gap = cyc - last;
        checks++;
        if (gap != CLKS_PER_BIT) begin
          failures++;
          $display("tick gap %0d expected %0d", gap, CLKS_PER_BIT);
        end
        last = cyc;
        n++;
      end
    end
    // Clear in the middle of a period restarts it.
    repeat (100) @(negedge clk);
    clear = 1'b1;
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (tick) begin failures++; $display("tick while clear"); end
    end
    clear = 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!tick && cyc < 1000);
    checks++;
    if (cyc != CLKS_PER_BIT - 1) begin
      failures++;
      $display("first tick after clear at %0d expected %0d", cyc, CLKS_PER_BIT - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
