// tb_uart_tx: self-checking test of the 8N1 transmitter at 434 clocks per
// bit. An independent receiver samples the line in the middle of each bit
// and checks start bit, data bits (bit 0 first) and stop bit. It also checks
// the frame length (done rises 10 * 434 clocks after the request), the
// active and done flags, the idle level, and that a request made during a
// frame is ignored.
module tb_uart_tx;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CPB = 434;

  logic       clk = 1'b0;
  logic       rst;
  logic       transmit;
  logic [7:0] data;
  logic       tx;
  logic       active;
  logic       done;
  int         checks = 0;
  int         failures = 0;

  uart_tx dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
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

  // Receive one frame whose start bit began at the last falling edge seen.
  task automatic receive(output logic [7:0] b, output bit stop_ok);
    repeat (CPB / 2) @(negedge clk);
    check(tx == 1'b0, "start bit low at mid-bit");
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(negedge clk);
    stop_ok = (tx == 1'b1);
  endtask

  initial begin
    logic [7:0] sent, got;
    bit         stop_ok;
    int         cyc;
    rst = 1'b1; transmit = 1'b0; data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(tx == 1'b1 && !active, "idle line high, not active");
    for (int f = 0; f < 12; f++) begin
      sent = (f == 0) ? 8'hA5 : (f == 1) ? 8'h00 : (f == 2) ? 8'hFF : 8'($urandom);
      data = sent;
      transmit = 1'b1;
      @(negedge clk);            // request taken on the edge before this
      transmit = 1'b0;
      data = ~sent;              // the latched byte must not follow the bus
      check(tx == 1'b0 && active && !done, "frame started");
      fork
        receive(got, stop_ok);
        begin
          // A request in the middle of the frame must be ignored.
          repeat (3 * CPB) @(negedge clk);
          data = 8'h3C;
          transmit = 1'b1;
          @(negedge clk);
          transmit = 1'b0;
        end
      join
      check(got == sent, $sformatf("byte %02h received %02h", sent, got));
      check(stop_ok, "stop bit high");
      // done must rise exactly 10 bit periods after the request edge.
      cyc = 10 * CPB - (CPB / 2 + 9 * CPB) - 1;
      repeat (cyc) @(negedge clk);
      check(!done && active, "still in stop bit one clock before the end");
      @(negedge clk);
      check(done && !active && tx, "done after 10 bit periods");
      // Line must stay idle: the ignored request produced no frame.
      repeat (2 * CPB) begin
        @(negedge clk);
        if (tx !== 1'b1) begin
          check(1'b0, "spurious frame");
          break;
        end
      end
      check(done, "done holds until the next frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
