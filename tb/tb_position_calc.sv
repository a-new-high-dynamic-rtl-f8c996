// tb_position_calc: random and corner amplitude pairs; the result must be
// (a-b)/(a+b) in Q1.15 truncated toward zero and limited to +-32767, 0 for a
// zero sum, and arrive
// 16 clocks after in_valid.
module tb_position_calc;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [AMP_W-1:0] a, b;
  logic in_valid;
  logic signed [POS_W-1:0] pos;
  logic pos_valid;
  int checks = 0, failures = 0;
  int cyc;

  position_calc dut (.*);
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

  task automatic run(input longint av, input longint bv);
    longint expv, d;
    int t0;
    @(negedge clk);
    a = AMP_W'(av); b = AMP_W'(bv); in_valid = 1;
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    @(posedge pos_valid);
    check(cyc - t0 == POS_W, $sformatf("latency %0d", cyc - t0));
    #1;
    d = av - bv;
    if (av + bv == 0) expv = 0;
    else if (d >= 0) expv = (d <<< 15) / (av + bv);
    else expv = -(((-d) <<< 15) / (av + bv));
    if (expv > 32767) expv = 32767;     // full scale is symmetric, +-(1 - 2^-15)
    if (expv < -32767) expv = -32767;
    check(longint'(pos) == expv, $sformatf("(%0d-%0d)/(%0d+%0d) gave %0d expected %0d", av, bv, av, bv, pos, expv));
  endtask

  initial begin
    a = '0; b = '0; in_valid = 0; cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(0, 0);
    run(100, 100);
    run(300, 100);      // +0.5
    run(100, 300);      // -0.5
    run(1000, 0);       // just below +1
    run(0, 1000);
    run((1 << 24) - 1, (1 << 24) - 1);
    run((1 << 24) - 1, 1);
    for (int k = 0; k < 300; k++)
      run(longint'($urandom) >> (8 + $urandom % 20), longint'($urandom) >> (8 + $urandom % 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
