// tb_pulse_generator: checks the ring restart pulse at its default rates:
// 50 MHz in, 25 kHz out, so falling edges are 2000 clocks apart, and every
// pulse is low for exactly 2 clocks. Also checks that reset holds the output
// low and that the first pulse follows one half period after reset.
module tb_pulse_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PERIOD = 50_000_000 / 25_000;  // 2000 clocks
  localparam int unsigned WIDTH  = 2;

  logic clk = 1'b0;
  logic reset;
  logic pulse_n;
  int   checks = 0;
  int   failures = 0;

  pulse_generator dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s", $time, what);
    end
  endtask

  initial begin
    int cyc, last_fall, low_len, n_pulses;
    bit prev;
    reset = 1'b1;
    repeat (5) @(negedge clk);
    check(pulse_n == 1'b0, "output low during reset");
    reset = 1'b0;
    cyc = 0; last_fall = -1; low_len = 0; n_pulses = 0; prev = 1'b0;
    while (n_pulses < 8) begin
      @(negedge clk);
      cyc++;
      if (cyc == 2) check(pulse_n == 1'b1, "rings released after reset");
      if (prev && !pulse_n) begin
        if (last_fall < 0)
          check(cyc >= int'(PERIOD / 2) && cyc <= int'(PERIOD / 2) + 3,
                $sformatf("first pulse at %0d", cyc));
        else
          check(cyc - last_fall == int'(PERIOD), $sformatf("period %0d", cyc - last_fall));
        last_fall = cyc;
        low_len   = 0;
      end
      if (!pulse_n) low_len++;
      if (!prev && pulse_n && last_fall > 0) begin
        check(low_len == int'(WIDTH), $sformatf("pulse width %0d", low_len));
        n_pulses++;
      end
      prev = pulse_n;
    end
    // Reset in the middle stops the rings again.
    reset = 1'b1;
    repeat (2) @(negedge clk);
    check(pulse_n == 1'b0, "reset forces the output low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
