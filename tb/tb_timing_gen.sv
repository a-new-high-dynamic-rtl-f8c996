// tb_timing_gen: checks the window strobes of timing_gen against a counting
// model, the free-running result tick, and re-alignment of the window by the
// bunch trigger (new window start 2 clocks after the trigger is first sampled, abort flag
// only when a window is cut short).
module tb_timing_gen;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, bunch_trig = 0, trig_en = 1;
  logic win_start, win_last, win_abort, tick_res;
  int checks = 0, failures = 0;
  int ref_cnt, free_cnt, cyc, aborts, trig_at, starts_after_trig;

  timing_gen #(.WIN_LEN(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // two clocks are counted before the first check
    ref_cnt = 2; free_cnt = 2; cyc = 0; aborts = 0; trig_at = -100;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      // drive the trigger at a few odd moments (held 2 clocks)
      @(negedge clk);
      bunch_trig = (cyc % 300 == 123) || (cyc % 300 == 124) || (cyc == 1500) || (cyc == 1501);
      if (cyc == 1700) trig_en = 0;
      if (cyc == 1723 || cyc == 1724) bunch_trig = 1;
      if (bunch_trig && (cyc % 300 == 123 || cyc == 1500)) trig_at = cyc;
      @(posedge clk);
      #1;
      // model: trigger edge seen after two synchroniser stages
      check(win_start == (ref_cnt == 0), "win_start");
      check(win_last == (ref_cnt == N - 1), "win_last");
      check(tick_res == (free_cnt == 0), "tick_res");
      if (win_abort) aborts++;
      if (cyc == trig_at + 1 && trig_en) begin
        check(win_abort == (ref_cnt != N - 1), "abort flag at trigger");
        ref_cnt = 0;
      end else begin
        ref_cnt = (ref_cnt + 1) % N;
      end
      if (cyc == trig_at + 2 && trig_en) check(win_start, "window start 2 clocks after trigger sampled");
      free_cnt = (free_cnt + 1) % N;
    end
    check(aborts >= 5, "trigger re-alignment happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
