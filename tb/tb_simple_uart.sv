// tb_simple_uart: end-to-end test of the output interface with a short bit
// period (20 clocks) to keep the run brief. Bits arrive with random gaps;
// the testbench groups them in eights itself, and checks that every frame
// on the line carries the group completed just before its start bit, in
// arrival order (first bit first), and that groups completed while a frame
// was on the line were dropped rather than queued.
module tb_simple_uart;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CPB = 20;

  logic       clk = 1'b0;
  logic       rst;
  logic       serial_in;
  logic       receive_pulse;
  logic       tx;
  logic       led_active;
  logic       led_done;
  logic [7:0] byte_data;
  logic       byte_ready;
  int         checks = 0;
  int         failures = 0;

  simple_uart #(.CLKS_PER_BIT(CPB)) dut (.*);

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

  // Reference grouping of the bit stream.
  logic [7:0] group;
  int         nbits = 0;
  logic [7:0] last_group;
  int         n_groups = 0;
  bit         line_busy = 0;
  int         n_dropped = 0;
  int         n_frames = 0;
  bit         driving = 1;

  always @(negedge clk) if (!rst && driving) begin
    receive_pulse <= 1'($urandom_range(0, 2) == 0);
    serial_in     <= 1'($urandom_range(0, 1));
  end

  always @(posedge clk) if (!rst && receive_pulse) begin
    group[nbits] = serial_in;   // first bit of the group into bit 0
    nbits++;
    if (nbits == 8) begin
      nbits = 0;
      last_group = group;
      n_groups++;
      if (line_busy) n_dropped++;
    end
  end

  initial begin
    logic [7:0] expect_b, got;
    rst = 1'b1; serial_in = 1'b0; receive_pulse = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (n_frames < 40) begin
      @(negedge clk);
      if (tx == 1'b0) begin
        line_busy = 1;
        expect_b  = last_group;
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(negedge clk);
          got[i] = tx;
        end
        repeat (CPB) @(negedge clk);
        check(tx == 1'b1, "stop bit");
        check(got == expect_b, $sformatf("frame %02h expected %02h", got, expect_b));
        check(led_active, "active during stop bit");
        repeat (CPB / 2) @(negedge clk);
        line_busy = 0;
        n_frames++;
      end
    end
    driving = 0;
    receive_pulse = 1'b0;
    repeat (12 * CPB) @(negedge clk);
    check(led_done && !led_active, "done after the last frame");
    check(n_dropped > 0, "some bytes were dropped while the line was busy");
    $display("groups=%0d frames=%0d dropped=%0d", n_groups, n_frames, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
