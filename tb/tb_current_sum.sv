// tb_current_sum: random amplitude sets, including all-maximum; the
// registered sum must equal the arithmetic sum one clock after in_valid and
// hold until the next in_valid.
module tb_current_sum;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0][AMP_W-1:0] amp;
  logic in_valid;
  logic [CUR_W-1:0] current;
  logic cur_valid;
  int checks = 0, failures = 0;

  current_sum dut (.*);
  always #5 clk = ~clk;

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

  initial begin
    longint s;
    amp = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      s = 0;
      for (int c = 0; c < 4; c++) begin
        amp[c] = (k == 0) ? '1 : AMP_W'($urandom);
        s += longint'(amp[c]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(cur_valid == 1'b1, "cur_valid one clock after in_valid");
      check(longint'(current) == s, $sformatf("sum %0d expected %0d", current, s));
      amp = '0;
      @(negedge clk);
      check(cur_valid == 1'b0 && longint'(current) == s, "sum held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
