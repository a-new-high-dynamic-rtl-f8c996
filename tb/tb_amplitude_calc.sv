// tb_amplitude_calc: random and corner I/Q pairs; the result must be the
// exact integer square root floor(sqrt(i^2+q^2)) (checked by r^2 <= s <
// (r+1)^2), saturated at 2^24-1, and arrive 27 clocks after in_valid.
module tb_amplitude_calc;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [IQ_W-1:0] i_in, q_in;
  logic in_valid;
  logic [AMP_W-1:0] amp;
  logic amp_valid, busy;
  int checks = 0, failures = 0;
  int cyc;

  amplitude_calc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint i, input longint q);
    longint s, r;
    int t0;
    @(negedge clk);
    i_in = IQ_W'(i); q_in = IQ_W'(q); in_valid = 1;
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    @(posedge amp_valid);
    check(cyc - t0 == IQ_W + 1, $sformatf("latency %0d", cyc - t0));
    #1;
    s = i * i + q * q;
    r = longint'(amp);
    if (r == (1 << AMP_W) - 1)
      check(s >= r * r, $sformatf("saturated result for %0d,%0d", i, q));
    else
      check(r * r <= s && (r + 1) * (r + 1) > s, $sformatf("sqrt(%0d^2+%0d^2) gave %0d", i, q, r));
  endtask

  initial begin
    i_in = '0; q_in = '0; in_valid = 0; cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(0, 0);
    run(3, 4);
    run(-3, 4);
    run(1, 1);
    run(-(1 << 25), 0);
    run(-(1 << 25), -(1 << 25));           // saturates
    run((1 << 24) - 1, 0);
    for (int k = 0; k < 200; k++) begin
      longint i, q;
      i = longint'($signed($urandom)) >>> (7 + $urandom % 20);
      q = longint'($signed($urandom)) >>> (7 + $urandom % 20);
      run(i, q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
