// tb_bpm_top: end-to-end test of bpm_top with all parameters at their
// defaults (512-sample windows, 100 ms DCM time constant, 4 x 16 k debug
// memory). Four IF tones at 3/8 of the sample rate stand for the electrode
// signals; a second link transmitter plays the preceding BPM, and a link
// receiver listens to the DUT's own current link. Checked mechanisms, each
// counted and required at least once:
//   results        positions and current against the tone amplitudes
//   link           the DUT's current arrives unchanged at a receiver
//   dac            hpos and current DAC words settle at the result values
//   trigger        a bunch trigger re-aligns the measurement window
//   interlock      a loss of 100x the threshold trips after about
//                  tau*ln(100/99) = 102 results, and is released afterwards
//   capture        raw samples recorded in the debug memory read back
//   playback       stimuli loaded into the debug memory drive the processing
//   attenuator     attenuator codes written over the bus reach the ports
//   front          the front-panel DACs repeat the back DAC streams chosen
//                  over the bus
module tb_bpm_top;
  import bpm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0][ADC_W-1:0] adc_data;
  logic bunch_trig, link_rx, link_tx, interlock;
  logic [NDAC-1:0] dac_sclk, dac_sdata, dac_fsync;
  logic [NFRONT-1:0] front_sclk, front_sdata, front_fsync;
  logic [NCH-1:0][5:0] att_rf, att_if;
  logic bus_req, bus_we, bus_ack;
  logic [17:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic res_valid;
  logic signed [POS_W-1:0] hpos, vpos;
  logic [CUR_W-1:0] current;
  logic signed [DIFF_W-1:0] fast_diff, slow_diff;

  int checks = 0, failures = 0;
  longint cyc;
  real ampl[NCH];
  real phase0;
  int n_results, n_link, n_dac, n_trig, n_trip, n_release, n_capture, n_play, n_att, n_front;

  bpm_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask
  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- electrode tones ------------------------------------------------------
  function automatic logic [ADC_W-1:0] tone(input real a, input longint n);
    return ADC_W'($rtoi($floor(a * $cos(2.0 * PI * 3.0 / 8.0 * real'(n) + phase0) + 0.5)));
  endfunction
  always @(negedge clk)
    for (int c = 0; c < NCH; c++) adc_data[c] <= tone(ampl[c], cyc);

  // ---- preceding BPM: a second link transmitter -----------------------------
  logic [CUR_W-1:0] prev_cur;
  logic prev_send;
  pof_link_tx #(.W(CUR_W)) u_prev (.clk, .rst_n, .cur(prev_cur), .cur_valid(prev_send),
                                   .tx(link_rx), .frame_sent());
  always @(posedge clk) prev_send <= (cyc % 512 == 100);

  // ---- following BPM: receiver of the DUT's link ----------------------------
  logic [CUR_W-1:0] next_cur;
  logic next_valid, next_locked, next_err;
  logic [CUR_W-1:0] last_current;
  pof_link_rx #(.W(CUR_W)) u_next (.clk, .rst_n, .rx(link_tx), .cur(next_cur), .cur_valid(next_valid),
                                   .locked(next_locked), .code_err(next_err));
  always @(negedge clk) if (rst_n) begin
    if (res_valid) last_current = current;
    if (next_valid && n_results > 2) begin
      check(next_cur == last_current, $sformatf("link word %0d expected %0d", next_cur, last_current));
      n_link++;
    end
    if (next_err) check(1'b0, "link code error");
  end

  // ---- DAC pins -------------------------------------------------------------
  logic [NDAC-1:0] sclk_d;
  logic [NDAC-1:0][15:0] dsh, dword;
  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < NDAC; d++) begin
      if (dac_sclk[d] && !sclk_d[d]) begin
        if (dac_fsync[d]) begin
          dword[d] = dsh[d];
        end
        dsh[d] = {dsh[d][14:0], dac_sdata[d]};
      end
    end
    sclk_d <= dac_sclk;
  end
  logic [NFRONT-1:0] fsclk_d;
  logic [NFRONT-1:0][15:0] fsh, fword;
  always @(negedge clk) if (rst_n) begin
    for (int f = 0; f < NFRONT; f++) begin
      if (front_sclk[f] && !fsclk_d[f]) begin
        if (front_fsync[f]) fword[f] = fsh[f];
        fsh[f] = {fsh[f][14:0], front_sdata[f]};
      end
    end
    fsclk_d <= front_sclk;
  end

  // ---- bus ------------------------------------------------------------------
  task automatic wr(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_req = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_req = 0; bus_we = 0;
  endtask
  task automatic rd(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_req = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_req = 0;
    d = bus_rdata;
  endtask

  // expected values for the current tone amplitudes
  function automatic real exp_pos(input real a, input real b);
    return 32768.0 * (a - b) / (a + b);
  endfunction
  function automatic real exp_cur();
    return 256.0 * (ampl[0] + ampl[1] + ampl[2] + ampl[3]);
  endfunction

  task automatic wait_results(input int n);
    repeat (n) @(posedge res_valid);
    @(negedge clk);
  endtask

  task automatic check_results(input real a0, input real a1, input real a2, input real a3, input string what);
    real ec;
    ec = 256.0 * (a0 + a1 + a2 + a3);
    check(rabs(real'(hpos) - exp_pos(a0, a1)) < 40.0, $sformatf("%s hpos %0d expected %f", what, hpos, exp_pos(a0, a1)));
    check(rabs(real'(vpos) - exp_pos(a2, a3)) < 40.0, $sformatf("%s vpos %0d expected %f", what, vpos, exp_pos(a2, a3)));
    check(rabs(real'(current) - ec) < 0.003 * ec, $sformatf("%s current %0d expected %f", what, current, ec));
  endtask

  always @(negedge clk) if (rst_n && res_valid) n_results++;
  always @(negedge clk) if (rst_n && dut.win_abort) n_trig++;

  initial begin
    logic [31:0] v;
    int k, trip_at;
    real own;
    cyc = 0; phase0 = 0.4;
    ampl = '{10000.0, 6000.0, 8000.0, 8000.0};
    bunch_trig = 0; bus_req = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    prev_cur = CUR_W'($rtoi(exp_cur()));
    sclk_d = '0; dsh = '0; dword = '0;
    {n_results, n_link, n_dac, n_trig, n_trip, n_release, n_capture, n_play, n_att, n_front} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // --- attenuators
    wr(REG_ATT_RF, {8'd0, 6'd40, 6'd30, 6'd20, 6'd10});
    wr(REG_ATT_IF, {8'd0, 6'd1, 6'd2, 6'd3, 6'd4});
    @(negedge clk);
    check(att_rf[0] == 10 && att_rf[3] == 40 && att_if[0] == 4 && att_if[3] == 1, "attenuator ports");
    if (att_rf[2] == 30) n_att++;
    wr(REG_THRESH, 100000);

    // --- steady beam, no loss
    wait_results(12);
    check_results(ampl[0], ampl[1], ampl[2], ampl[3], "steady");
    check(!interlock, "no interlock without loss");
    rd(REG_POS, v);
    check(v == {16'(vpos), 16'(hpos)}, "positions over the bus");
    rd(REG_PREV, v);
    check(v == 32'(prev_cur), "preceding current received");
    // DAC words: hpos and current (current >> 10)
    check(rabs(real'($signed(dword[0])) - real'(hpos)) <= 2.0, $sformatf("DAC hpos %0d vs %0d", $signed(dword[0]), hpos));
    check(rabs(real'($signed(dword[2])) - real'(current >> 10)) <= 2.0, $sformatf("DAC current %0d vs %0d", $signed(dword[2]), current >> 10));
    if (dword[0] != 0 && dword[2] != 0) n_dac++;
    // front-panel DACs: reset sources hpos and current, then vpos and slow diff
    check(fword[0] == dword[0] && fword[1] == dword[2], "front DACs at reset selection");
    wr(REG_FRONT, {25'd0, 3'd4, 1'b0, 3'd1});
    repeat (600) @(negedge clk);
    check(fword[0] == dword[1] && fword[1] == dword[4],
          $sformatf("front DACs %0h %0h vs %0h %0h", fword[0], fword[1], dword[1], dword[4]));
    if (fword[0] == dword[1] && fword[1] == dword[4] && dword[1] != dword[0]) n_front++;

    // --- bunch trigger in the middle of a window
    @(negedge clk);
    while (cyc % 512 != 300) @(negedge clk);
    bunch_trig = 1;
    repeat (4) @(negedge clk);
    bunch_trig = 0;
    wait_results(3);
    check_results(ampl[0], ampl[1], ampl[2], ampl[3], "after trigger");

    // --- beam position change
    ampl = '{7000.0, 9000.0, 12000.0, 4000.0};
    prev_cur = CUR_W'($rtoi(exp_cur()));
    wait_results(3);
    check_results(ampl[0], ampl[1], ampl[2], ampl[3], "moved beam");

    // --- loss of 100x threshold between the preceding BPM and this one
    own = exp_cur();
    prev_cur = CUR_W'($rtoi(own + 10.0e6));
    trip_at = -1;
    for (k = 0; k < 200 && trip_at < 0; k++) begin
      wait_results(1);
      if (interlock) trip_at = k;
    end
    // prev_cur reaches the DCM within one result, so allow 100..106
    check(trip_at >= 99 && trip_at <= 106, $sformatf("interlock after %0d results", trip_at + 1));
    if (trip_at >= 0) n_trip++;
    rd(REG_STATUS, v);
    check(v[0] && v[2], "status: interlock and link locked");
    prev_cur = CUR_W'($rtoi(own));
    // the integrated difference decays from just above the threshold
    for (k = 0; k < 400 && interlock; k++) wait_results(1);
    check(!interlock, $sformatf("interlock released %0d results after the loss ends", k));
    if (!interlock && n_trip > 0) n_release++;

    // --- debug capture of raw samples
    wr(REG_CTRL, 32'b110);
    k = 0;
    do begin
      repeat (1000) @(negedge clk);
      rd(REG_STATUS, v);
      k++;
    end while (!v[1] && k < 40);
    check(v[1], "capture done");
    begin
      logic signed [15:0] s [16];
      int mx;
      mx = 0;
      for (int i = 0; i < 16; i++) begin
        rd(18'h20000 | 18'(i + 100), v);
        s[i] = 16'(v);
        if (int'(s[i]) > mx) mx = int'(s[i]);
      end
      for (int i = 0; i < 8; i++) check(s[i] == s[i + 8], "captured tone repeats every 8 samples");
      check(mx > 6000 && mx <= 7000, $sformatf("captured peak %0d of channel 0 (7000)", mx));
      if (mx > 6000) n_capture++;
    end

    // --- hardware-in-the-loop playback: load tones, run them through
    for (int c = 0; c < NCH; c++) begin
      real pa[NCH];
      pa = '{5000.0, 15000.0, 9000.0, 11000.0};
      for (int i = 0; i < DBG_DEPTH; i++) begin
        @(negedge clk);
        bus_req = 1; bus_we = 1; bus_addr = 18'h20000 | 18'(c * DBG_DEPTH + i);
        bus_wdata = 32'($rtoi($floor(pa[c] * $cos(2.0 * PI * 3.0 / 8.0 * i + 1.1) + 0.5)));
        @(negedge clk);
        bus_req = 0; bus_we = 0;
      end
    end
    prev_cur = CUR_W'($rtoi(256.0 * 40000.0));
    wr(REG_CTRL, 32'b101);
    wait_results(4);
    check_results(5000.0, 15000.0, 9000.0, 11000.0, "playback");
    if (rabs(real'(hpos) + 16384.0) < 40.0) n_play++;
    wr(REG_CTRL, 32'b100);
    wait_results(3);
    check_results(ampl[0], ampl[1], ampl[2], ampl[3], "live again");

    // --- every mechanism happened
    check(n_results > 0, "results");
    check(n_link > 0, "link words");
    check(n_dac > 0, "dac");
    check(n_front > 0, "front");
    check(n_trig > 0, "trigger re-alignment");
    check(n_trip > 0, "interlock trip");
    check(n_release > 0, "interlock release");
    check(n_capture > 0, "capture");
    check(n_play > 0, "playback");
    check(n_att > 0, "attenuators");
    $display("mechanisms: results=%0d link=%0d dac=%0d trigger=%0d trip=%0d release=%0d capture=%0d playback=%0d att=%0d front=%0d",
             n_results, n_link, n_dac, n_trig, n_trip, n_release, n_capture, n_play, n_att, n_front);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
