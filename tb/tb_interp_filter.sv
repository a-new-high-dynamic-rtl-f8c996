// tb_interp_filter: input every 32 clocks (RES_PERIOD 32). Checks four
// outputs per input, evenly spaced every 8 clocks; a constant passes with gain
// 1; a ramp (which the cubic midpoint rule reproduces exactly) comes out as a
// ramp with a quarter of the input step; a full-scale step stays within range.
module tb_interp_filter;
  localparam int unsigned W = 16, RP = 32;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x, y;
  logic in_valid, y_valid;
  int checks = 0, failures = 0;
  int cyc, last_out, nout;
  longint outs[$];

  interp_filter #(.W(W), .RES_PERIOD(RP)) dut (.*);
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

  always @(negedge clk) if (rst_n && y_valid) begin
    outs.push_back(longint'(y));
    if (last_out >= 0) check(cyc - last_out == RP / 4, $sformatf("spacing %0d", cyc - last_out));
    last_out = cyc;
    nout++;
  end

  task automatic feed(input longint v, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      x = W'(v); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (RP - 2) @(negedge clk);
    end
  endtask

  initial begin
    x = '0; in_valid = 0; cyc = 0; last_out = -1; nout = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    feed(12345, 10);
    check(nout == 40, $sformatf("4 outputs per input: %0d", nout));
    check(outs[$] == 12345 && outs[$-3] == 12345, "DC gain 1");
    outs.delete();
    for (int k = 0; k < 12; k++) feed(1000 + 400 * k, 1);
    // after the filter has filled, successive outputs differ by 100
    for (int k = 24; k < 47; k++) check(outs[k + 1] - outs[k] == 100, $sformatf("ramp step %0d", outs[k + 1] - outs[k]));
    outs.delete();
    feed(-32768, 6);
    feed(32767, 6);
    foreach (outs[k]) check(outs[k] >= -32768 && outs[k] <= 32767, "in range");
    check(outs[$] == 32767, "settles at full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
