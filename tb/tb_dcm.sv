// tb_dcm: own and preceding currents with a short time constant (64 updates).
// Checks the fast difference (exact), the slow difference against a
// floating-point first-order model, and that the interlock rises after the
// number of updates the model predicts for a loss of 10x the threshold (for
// both signs), stays low for a loss below the threshold, and falls again when
// the loss ends.
module tb_dcm;
  import bpm_pkg::*;
  localparam int unsigned TAU = 64;
  logic clk = 0, rst_n = 0;
  logic [CUR_W-1:0] own_current, prev_current;
  logic cur_valid;
  logic [CUR_W:0] threshold;
  logic signed [CUR_W:0] fast_diff, slow_diff;
  logic diff_valid, interlock;
  int checks = 0, failures = 0;

  dcm #(.TAU_SAMPLES(TAU)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n updates with the given currents; returns the update index at which the
  // interlock first rose (-1 if never).
  task automatic run(input longint own, input longint prev, input int n, inout real m, output int first);
    first = -1;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      own_current = CUR_W'(own); prev_current = CUR_W'(prev); cur_valid = 1;
      @(negedge clk);
      cur_valid = 0;
      check(longint'(fast_diff) == own - prev, "fast difference");
      @(negedge clk);
      check(diff_valid, "diff_valid 2 clocks after cur_valid");
      m = m + (real'(own - prev) - m) / real'(TAU);
      check(rabs(real'(slow_diff) - m) <= 0.002 * rabs(real'(own - prev)) + 2.0, "slow difference");
      if (rabs(m) > 1.01 * real'(threshold)) check(interlock, "interlock expected");
      if (rabs(m) < 0.99 * real'(threshold)) check(!interlock, "no interlock expected");
      if (interlock && first < 0) first = k;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    real m;
    int first;
    own_current = '0; prev_current = '0; cur_valid = 0; m = 0.0;
    threshold = 100000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // loss below the threshold: no interlock
    run(20000000, 20080000, 6 * TAU, m, first);
    check(first < 0, "small loss must not trip");
    run(20000000, 20000000, 8 * TAU, m, first);
    // loss of 10x threshold: model trips when 1-(1-1/64)^n > 0.1, n = 7
    m = real'(slow_diff);
    run(20000000, 21000000, 20, m, first);
    check(first == 6, $sformatf("trip after %0d updates, expected 7", first + 1));
    run(20000000, 20000000, 8 * TAU, m, first);
    check(!interlock, "interlock released");
    // opposite sign
    run(21000000, 20000000, 20, m, first);
    check(first == 6, "trip for the opposite sign");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
