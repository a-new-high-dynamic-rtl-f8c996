// tb_dcm_integrator: step responses with a short time constant (64 updates):
// after n updates the output must follow h*(1-(1-1/tau)^n) within 0.2 % of
// the step, reach 63 % of the step after tau updates, decay back after the
// step ends, and y_valid must follow in_valid by one clock.
module tb_dcm_integrator;
  import bpm_pkg::*;
  localparam int unsigned TAU = 64;
  logic clk = 0, rst_n = 0;
  logic signed [DIFF_W-1:0] x, y;
  logic in_valid, y_valid;
  int checks = 0, failures = 0;

  dcm_integrator #(.TAU_SAMPLES(TAU)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply h for n updates, starting from model state m; returns new state.
  task automatic steps(input longint h, input int n, inout real m);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      x = DIFF_W'(h); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(y_valid, "y_valid one clock after in_valid");
      m = m + (real'(h) - m) / real'(TAU);
      check(rabs(real'(y) - m) <= 0.002 * rabs(real'(h)) + 2.0,
            $sformatf("update %0d: y=%0d model=%f", k, y, m));
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    real m;
    x = '0; in_valid = 0; m = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    steps(1000000, TAU, m);
    check(real'(y) > 0.628e6 && real'(y) < 0.636e6, $sformatf("63 %% point: %0d", y));
    steps(1000000, 4 * TAU, m);
    check(real'(y) > 0.99e6, "settles to the step");
    steps(0, 2 * TAU, m);
    steps(-40000000, TAU, m);
    check(y < 0, "negative input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
