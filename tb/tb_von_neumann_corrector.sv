// tb_von_neumann_corrector: self-checking test of the Von Neumann corrector.
//
// Drives random raw bits (and the four pair patterns explicitly), keeps its
// own pairing of the input stream, and checks that every output impulse
// carries the first bit of an unequal pair, arrives one clock after that
// pair, and that equal pairs produce nothing. Also checks the output rate on
// a biased stream stays below one bit per two inputs.
module tb_von_neumann_corrector;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst;
  logic data_in;
  logic impulse_bit;
  logic data_out;
  int   checks = 0;
  int   failures = 0;

  von_neumann_corrector dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: pairs counted from the first bit after reset.
  bit   have_first;
  bit   first_bit;
  bit   expect_valid;
  bit   expect_bit;
  int   n_in, n_out, n_discard;

  always @(posedge clk) begin
    if (rst) begin
      have_first   <= 0;
      expect_valid <= 0;
    end else begin
      // Compare what the DUT shows now against the previous cycle's model.
      checks++;
      if (impulse_bit !== expect_valid) begin
        failures++;
        $display("%0t impulse %0b expected %0b", $time, impulse_bit, expect_valid);
      end else if (expect_valid && data_out !== expect_bit) begin
        failures++;
        $display("%0t bit %0b expected %0b", $time, data_out, expect_bit);
      end
      n_in++;
      expect_valid <= 0;
      if (!have_first) begin
        have_first <= 1;
        first_bit  <= data_in;
      end else begin
        have_first <= 0;
        if (first_bit != data_in) begin
          expect_valid <= 1;
          expect_bit   <= first_bit;
        end else n_discard++;
      end
      if (impulse_bit) n_out++;
    end
  end

  task automatic send(input bit b);
    data_in <= b;
    @(posedge clk);
  endtask

  initial begin
    rst = 1'b1;
    data_in = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // The four pairs of the rule: 00, 01, 10, 11.
    send(0); send(0);
    send(0); send(1);
    send(1); send(0);
    send(1); send(1);
    // Random unbiased stream.
    repeat (4000) send(1'($urandom_range(0, 1)));
    // Strongly biased stream: about 90 % ones.
    repeat (4000) send($urandom_range(0, 9) != 0);
    // All ones: nothing may come out.
    repeat (200) send(1'b1);
    @(posedge clk);
    @(posedge clk);
    checks++;
    if (n_out == 0 || n_out * 2 > n_in) begin
      failures++;
      $display("output count %0d for %0d inputs out of range", n_out, n_in);
    end
    checks++;
    if (n_discard == 0) begin
      failures++;
      $display("no pair was discarded");
    end
    $display("inputs=%0d outputs=%0d discarded_pairs=%0d", n_in, n_out, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
