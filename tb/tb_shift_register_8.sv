// tb_shift_register_8: self-checking test of the serial-in parallel-out
// register. Shifts random bits with random gaps and checks after every
// clock that the register equals the last eight shifted bits, the oldest
// in bit 0, and that it holds its value when shift is low.
module tb_shift_register_8;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst;
  logic       shift;
  logic       serial_in;
  logic [7:0] data;
  logic [7:0] model;
  int         checks = 0;
  int         failures = 0;

  shift_register_8 dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; shift = 1'b0; serial_in = 1'b0; model = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      shift     <= 1'($urandom_range(0, 2) != 0);
      serial_in <= 1'($urandom_range(0, 1));
      @(posedge clk);
      if (shift) model = {serial_in, model[7:1]};
      #1;
      checks++;
      if (data !== model) begin
        failures++;
        $display("%0t data %h expected %h", $time, data, model);
      end
    end
    // Eight known bits: 1,0,1,1,0,0,1,0 in arrival order -> data 8'b0100_1101.
    begin
      bit seq [8] = '{1, 0, 1, 1, 0, 0, 1, 0};
      for (int k = 0; k < 8; k++) begin
        shift <= 1'b1; serial_in <= seq[k];
        @(posedge clk);
      end
      shift <= 1'b0;
      #1;
      checks++;
      if (data !== 8'b0100_1101) begin
        failures++;
        $display("known byte %b expected 01001101", data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
