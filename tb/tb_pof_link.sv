// tb_pof_link: pof_link_tx sends a new random current every 512 clocks over a
// line with a few clocks of delay to pof_link_rx. Checks: the receiver locks,
// every word arrives unchanged within one result period, the bit rate is
// 10 Mbit/s at 52 MHz (9846 +-1 bit ticks in 51200 clocks); a stuck line
// raises code_err and drops lock, and the link recovers on the next comma.
module tb_pof_link;
  localparam int unsigned W = 26;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] cur, rx_cur;
  logic cur_valid, tx, frame_sent, rx_line, rx_valid, locked, code_err;
  logic [7:0] dly;
  logic force_low;
  int checks = 0, failures = 0;
  int cyc, sent_at, ticks, errs;
  logic [W-1:0] expq[$];

  pof_link_tx #(.W(W)) u_tx (.clk, .rst_n, .cur, .cur_valid, .tx, .frame_sent);
  pof_link_rx #(.W(W)) u_rx (.clk, .rst_n, .rx(rx_line), .cur(rx_cur), .cur_valid(rx_valid),
                             .locked, .code_err);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    dly <= {dly[6:0], tx};
  end
  assign rx_line = force_low ? 1'b0 : dly[7];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (u_tx.bit_tick) ticks++;
    if (code_err) errs++;
    if (rx_valid) begin
      if (expq.size() > 0) begin
        logic [W-1:0] e;
        e = expq.pop_front();
        check(rx_cur == e, $sformatf("received %h expected %h", rx_cur, e));
        check(cyc - sent_at < 512, $sformatf("latency %0d", cyc - sent_at));
      end else check(1'b0, "unexpected word");
    end
  end

  task automatic send_words(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      cur = W'($urandom); cur_valid = 1;
      if (!force_low) expq.push_back(cur);
      sent_at = cyc;
      @(negedge clk);
      cur_valid = 0;
      repeat (510) @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    cur = '0; cur_valid = 0; cyc = 0; ticks = 0; errs = 0; force_low = 0; dly = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (400) @(negedge clk);
    check(locked, "locked on idle commas");
    t0 = ticks;
    send_words(100);
    check(ticks - t0 >= 9845 && ticks - t0 <= 9847, $sformatf("bit ticks %0d in 51200 clocks", ticks - t0));
    check(expq.size() == 0, "all words received");
    // stuck line
    force_low = 1;
    repeat (300) @(negedge clk);
    check(errs > 0, "code error detected");
    check(!locked, "lock dropped");
    expq.delete();
    send_words(1);
    force_low = 0;
    repeat (400) @(negedge clk);
    check(locked, "re-locked");
    send_words(20);
    check(expq.size() == 0, "words after recovery received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
