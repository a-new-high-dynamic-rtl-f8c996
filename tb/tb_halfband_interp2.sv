// tb_halfband_interp2: random inputs every 8 clocks (HALF_PERIOD 4); the
// outputs must alternate between the input delayed by two samples and the
// rounded, saturated midpoint (-x[n-3] + 9x[n-2] + 9x[n-1] - x[n])/16, one
// output every 4 clocks.
module tb_halfband_interp2;
  localparam int unsigned W = 16, HP = 4;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x, y;
  logic in_valid, y_valid;
  int checks = 0, failures = 0;
  int cyc, last_out;
  longint hist[4];
  longint expq[$];

  halfband_interp2 #(.W(W), .HALF_PERIOD(HP)) dut (.*);
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
    longint e;
    e = expq.pop_front();
    check(longint'(y) == e, $sformatf("output %0d expected %0d", y, e));
    if (last_out >= 0) check(cyc - last_out == HP, $sformatf("output spacing %0d", cyc - last_out));
    last_out = cyc;
  end

  initial begin
    longint v, mid;
    x = '0; in_valid = 0; cyc = 0; last_out = -1;
    hist = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      if (k % 50 < 5) v = (k % 2) ? 32767 : -32768;   // provoke saturation
      else v = longint'($signed(W'($urandom)));
      x = W'(v); in_valid = 1;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = v;
      mid = (9 * hist[1] + 9 * hist[2] - hist[0] - hist[3] + 8) >>> 4;
      if (mid > 32767) mid = 32767;
      if (mid < -32768) mid = -32768;
      expq.push_back(hist[2]);
      expq.push_back(mid);
      @(negedge clk);
      in_valid = 0;
      repeat (2 * HP - 2) @(negedge clk);
    end
    repeat (2 * HP) @(negedge clk);
    check(expq.size() == 0, "all outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
