// tb_bit_counter: self-checking test of the byte-complete counter. Sends
// random impulses and checks that transmit pulses for exactly one clock
// after every eighth impulse, never otherwise, and that count tracks the
// number of bits held.
module tb_bit_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst;
  logic       pulse;
  logic       transmit;
  logic [3:0] count;
  int         checks = 0;
  int         failures = 0;
  int         n_pulses = 0;
  int         n_tx = 0;

  bit_counter dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_tx;
    rst = 1'b1; pulse = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      pulse <= 1'($urandom_range(0, 3) == 0 || i > 2900);
      @(posedge clk);
      exp_tx = 0;
      if (pulse) begin
        n_pulses++;
        exp_tx = (n_pulses % 8 == 0);
      end
      #1;
      checks++;
      if (transmit !== exp_tx || count !== 4'(n_pulses % 8)) begin
        failures++;
        $display("%0t pulses=%0d transmit=%0b count=%0d", $time, n_pulses, transmit, count);
      end
      if (transmit) n_tx++;
    end
    checks++;
    if (n_tx != n_pulses / 8) begin
      failures++;
      $display("transmits %0d expected %0d", n_tx, n_pulses / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
