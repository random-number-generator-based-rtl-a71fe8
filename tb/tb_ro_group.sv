// tb_ro_group: checks a group of nine length-9 rings against a reference
// built in the testbench from nine separately instantiated ring models with
// the same seeds (the models are deterministic for a given seed): the group
// output must equal the XOR of the nine reference rings at every change,
// must rest high (nine ones XOR to one) while start_n is low, and must
// change far more often than a single ring.
module tb_ro_group;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned L    = 9;
  localparam int unsigned N    = 9;
  localparam int unsigned SEED = 55;

  logic         start_n;
  logic         group_out;
  logic [N-1:0] ref_out;
  int           checks = 0;
  int           failures = 0;
  int           n_group_edges = 0;
  int           n_ring0_edges = 0;
  int           mismatches = 0;

  ro_group #(.LENGTH(L), .NUM_RINGS(N), .SEED_BASE(SEED)) dut (
    .start_n  (start_n),
    .group_out(group_out)
  );

  for (genvar i = 0; i < int'(N); i++) begin : g_ref
    multimode_ro #(.LENGTH(L), .SEED(SEED + 7919 * i)) u_ref (
      .start_n(start_n),
      .ro_out (ref_out[i])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare 1 ps after any change, when both sides have settled.
  always @(group_out or ref_out) begin
    #1;
    if (group_out !== ^ref_out) mismatches++;
  end
  always @(group_out) n_group_edges++;
  always @(ref_out[0]) n_ring0_edges++;

  initial begin
    start_n = 1'b0;
    #(50_000);
    check(group_out == 1'b1, "group rests high");
    for (int k = 0; k < 5; k++) begin
      start_n = 1'b1;
      #(1_000_000);
      start_n = 1'b0;
      #(40_000);
      check(group_out == 1'b1, "group back at rest after restart pulse");
    end
    start_n = 1'b1;
    #(100_000);
    check(mismatches == 0, $sformatf("%0d mismatches against the XOR of the reference rings", mismatches));
    check(n_group_edges > 4 * n_ring0_edges,
          $sformatf("group edges %0d vs one ring %0d", n_group_edges, n_ring0_edges));
    $display("group edges=%0d single ring edges=%0d", n_group_edges, n_ring0_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
