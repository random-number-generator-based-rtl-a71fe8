// tb_trng_top: end-to-end test of the TRNG at its default rates (50 MHz
// clock, 25 kHz ring restarts, 115200 baud) in both configurations: with the
// Von Neumann corrector (the default) and without post-processing. For each
// instance a monitor checks the restart pulses, the corrector against its
// own model of the raw bit stream, the grouping of bits into bytes and every
// UART frame. The test also requires that each mechanism occurred: ring
// restarts, rings collapsing to their nominal mode, corrector outputs and
// discarded pairs, completed bytes, frames sent, bytes dropped while the
// line was busy, and a reset in mid-operation.
module tb_trng_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int FRAMES = 4;

  logic clk = 1'b0;
  logic reset;

  always #10 clk = ~clk;

  logic       tx      [2];
  logic       act     [2];
  logic       dn      [2];
  logic       bv      [2];
  logic       bval    [2];
  logic [7:0] bdata   [2];
  logic       bready  [2];
  int         checks  [2];
  int         fails   [2];
  int         n_restarts [2], n_merged [2], n_vn [2], n_disc [2];
  int         n_bytes [2], n_drop [2], n_frames [2];

  trng_top dut_pp (
    .clk(clk), .reset(reset), .tx(tx[0]), .led_active(act[0]), .led_done(dn[0]),
    .bit_valid(bv[0]), .bit_value(bval[0]), .byte_data(bdata[0]), .byte_ready(bready[0])
  );
  trng_top #(.POST_PROCESS(1'b0)) dut_raw (
    .clk(clk), .reset(reset), .tx(tx[1]), .led_active(act[1]), .led_done(dn[1]),
    .bit_valid(bv[1]), .bit_value(bval[1]), .byte_data(bdata[1]), .byte_ready(bready[1])
  );

  trng_monitor #(.PP(1'b1)) mon_pp (
    .clk(clk), .reset(reset), .ring_start_n(dut_pp.ring_start_n),
    .raw_bit(dut_pp.u_src.raw_bit), .bit_valid(bv[0]), .bit_value(bval[0]),
    .byte_ready(bready[0]), .led_active(act[0]), .tx(tx[0]),
    .ring_merges(dut_pp.u_src.u_ro21.g_ring[0].u_ro.merges),
    .checks(checks[0]), .failures(fails[0]), .n_restarts(n_restarts[0]),
    .n_merged_rings(n_merged[0]), .n_vn_bits(n_vn[0]), .n_vn_discards(n_disc[0]),
    .n_bytes(n_bytes[0]), .n_dropped(n_drop[0]), .n_frames(n_frames[0])
  );
  trng_monitor #(.PP(1'b0)) mon_raw (
    .clk(clk), .reset(reset), .ring_start_n(dut_raw.ring_start_n),
    .raw_bit(dut_raw.u_src.raw_bit), .bit_valid(bv[1]), .bit_value(bval[1]),
    .byte_ready(bready[1]), .led_active(act[1]), .tx(tx[1]),
    .ring_merges(dut_raw.u_src.u_ro21.g_ring[0].u_ro.merges),
    .checks(checks[1]), .failures(fails[1]), .n_restarts(n_restarts[1]),
    .n_merged_rings(n_merged[1]), .n_vn_bits(n_vn[1]), .n_vn_discards(n_disc[1]),
    .n_bytes(n_bytes[1]), .n_dropped(n_drop[1]), .n_frames(n_frames[1])
  );

  int own_checks = 0;
  int own_failures = 0;
  int n_resets = 0;

  task automatic require(input bit ok, input string what);
    own_checks++;
    if (!ok) begin
      own_failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic finish_test();
    $display("TB_RESULT checks=%0d failures=%0d",
             own_checks + checks[0] + checks[1], own_failures + fails[0] + fails[1]);
    $finish;
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    own_failures++;
    $display("watchdog expired");
    finish_test();
  end

  initial begin
    reset = 1'b1;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    // Run until both instances have sent a few frames.
    while (n_frames[0] < FRAMES / 2 || n_frames[1] < FRAMES / 2) @(negedge clk);
    // Reset in mid-operation: line idle, status cleared, rings held.
    reset = 1'b1;
    repeat (3) @(negedge clk);
    require(tx[0] && tx[1] && !act[0] && !act[1] && !dn[0] && !dn[1],
            "outputs return to idle under reset");
    require(dut_pp.ring_start_n == 1'b0, "rings held under reset");
    n_resets++;
    reset = 1'b0;
    while (n_frames[0] < FRAMES || n_frames[1] < FRAMES) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      $display("%s: restarts=%0d merged=%0d bits=%0d discarded_pairs=%0d bytes=%0d dropped=%0d frames=%0d",
               i == 0 ? "with corrector" : "raw", n_restarts[i], n_merged[i], n_vn[i],
               n_disc[i], n_bytes[i], n_drop[i], n_frames[i]);
      require(n_restarts[i] > 2, "ring restarts happened");
      require(n_merged[i] > 0, "a ring collapsed to its nominal mode");
      require(n_vn[i] > 0, "bits delivered");
      require(n_bytes[i] > n_frames[i], "bytes completed");
      require(n_drop[i] > 0, "bytes dropped while the line was busy");
      require(n_frames[i] >= FRAMES, "frames sent");
    end
    require(n_disc[0] > 0, "corrector discarded equal pairs");
    // Rates: with the corrector at most one bit per two clocks; raw one per clock.
    require(n_vn[0] < n_vn[1] / 2 + 8, "corrector at most halves the bit rate");
    require(n_resets == 1, "reset exercised");
    finish_test();
  end
endmodule
