// tb_bunch_modes: runs the linac's beam modes through bpm_top at its default
// parameters and checks that a result set does not depend on the bunch
// pattern inside the measurement window.
// Beam model: every bunch makes a burst of IF signal at 3/8 of the sample
// rate whose envelope is a 64-sample periodic Hann window. The bursts of all
// bunches share one IF phase, as they do when the bunch rate is a
// sub-harmonic of the 26 MHz reference. The bunch charge q per electrode
// gives a burst of peak q ADC LSB. The Hann envelope has no spectrum at twice
// the IF, so each burst that falls wholly into a window adds exactly 16*q to
// the window's IF amplitude sum. One window of 512 samples with bursts every
// 2*N samples therefore gives an amplitude of 16*q/N ADC LSB, or
// 4096*q/N in amplitude units (ADC LSB x 256). The burst peak is scaled as
// q = Q0*N, which keeps the mean beam current constant, so every mode must
// give the same amplitudes, currents and positions.
// Workloads:
//   CW trains     26 MHz / N for N = 1, 2, 4, ..., 256 (26 MHz to 102 kHz),
//                 free-running windows
//   single bunch  single bunches 100 us apart, each announced by the bunch
//                 trigger: one window holds the bunch, the following ones
//                 are empty
//   SRF gun       100 kHz bunches (one per 520 samples) with the trigger: each
//                 window is restarted on a bunch and none is empty; without
//                 the trigger the 512-sample windows slip against the bunches:
//                 one window in 65 holds no bunch start, bursts that straddle
//                 a window edge are split, and the mean over many windows is
//                 512/520 of a full window
// The channel charges Q0 = {100, 60, 80, 80} give hpos = (100-60)/160 = 0.25
// (8192 in Q1.15), vpos = 0 and a current of 4096*320.
module tb_bunch_modes;
  import bpm_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  BL = 64;                 // burst length in samples
  localparam real Q0[NCH] = '{100.0, 60.0, 80.0, 80.0};
  localparam real CUR_EXP = 4096.0 * 320.0;
  localparam real HPOS_EXP = 8192.0;

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
  longint cyc = 0;

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
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- beam model ------------------------------------------------------------
  // periodic mode: bursts at s0 + OFF + k*P (s0 on a window start)
  // single mode:   one burst starting at cycle b_start
  bit     periodic = 0, single = 0;
  longint s0, b_start;
  int     P, OFF, NDIV;

  function automatic real hann(input longint t);
    return 0.5 - 0.5 * $cos(2.0 * PI * real'(t) / real'(BL));
  endfunction

  function automatic real envelope(input longint n);
    real e = 0.0;
    if (periodic && n >= s0 + OFF) begin
      longint d = (n - s0 - OFF) % P;
      for (longint t = d; t < BL && t <= n - s0 - OFF; t += P) e += hann(t);
      e *= real'(NDIV);
    end
    if (single && n >= b_start && n < b_start + BL) e += 256.0 * hann(n - b_start);
    return e;
  endfunction

  always @(negedge clk) begin
    real e, lo;
    e  = envelope(cyc);
    lo = $cos(2.0 * PI * 3.0 / 8.0 * real'(cyc));
    for (int c = 0; c < NCH; c++)
      adc_data[c] <= ADC_W'($rtoi($floor(Q0[c] * e * lo + 0.5)));
  end

  // ---- helpers ---------------------------------------------------------------
  task automatic bus_write(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_req = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_req = 0; bus_we = 0;
    @(negedge clk);
  endtask

  task automatic next_result();
    do @(posedge clk); while (!res_valid);
  endtask

  function automatic bit result_full();
    return rabs(real'(current) - CUR_EXP) < 0.003 * CUR_EXP &&
           rabs(real'(hpos) - HPOS_EXP) < 40.0 && rabs(real'(vpos)) < 40.0;
  endfunction

  task automatic check_full(input string what);
    check(rabs(real'(current) - CUR_EXP) < 0.003 * CUR_EXP,
          $sformatf("%s: current %0d, expected %0.0f", what, current, CUR_EXP));
    check(rabs(real'(hpos) - HPOS_EXP) < 40.0, $sformatf("%s: hpos %0d", what, hpos));
    check(rabs(real'(vpos)) < 40.0, $sformatf("%s: vpos %0d", what, vpos));
  endtask

  // next window start at or after the given cycle, on the current window grid
  longint grid0;
  function automatic longint next_window(input longint after);
    return grid0 + ((after - grid0 + 511) / 512) * 512;
  endfunction

  int n_cw = 0, n_single = 0, n_srf = 0, n_slip = 0;

  initial begin
    adc_data = '0; bunch_trig = 0; link_rx = 1; bus_req = 0; bus_we = 0;
    bus_addr = '0; bus_wdata = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;

    // window grid of the free-running windows, seen at the sample input
    do @(posedge clk); while (!dut.win_start);
    grid0 = cyc;

    // ---- CW bunch trains, 26 MHz / N -----------------------------------------
    for (int k = 0; k <= 8; k++) begin
      longint start;
      int n;
      n = 1 << k;
      start = next_window(cyc + 4);
      @(negedge clk);
      periodic = 1; s0 = start; NDIV = n; P = 2 * n;
      OFF = P > BL ? (P - BL) / 2 : 0;
      while (cyc < start + 1024 + 100) @(posedge clk);
      repeat (4) begin
        next_result();
        check_full($sformatf("26 MHz / %0d", n));
      end
      n_cw++;
    end
    @(negedge clk);
    periodic = 0;

    // ---- single bunches with the bunch trigger, 100 us apart ------------------
    repeat (10) next_result();
    for (int b = 0; b < 5; b++) begin
      longint t;
      int quiet, full;
      quiet = 0; full = 0;
      repeat (100 + $urandom_range(0, 511)) @(negedge clk);
      t = cyc;
      bunch_trig = 1;
      b_start = t + 30;
      single = 1;
      repeat (10) @(negedge clk);
      bunch_trig = 0;
      next_result();
      // a window that ended just before the trigger may still report
      if (cyc < t + 300) next_result();
      check(cyc > t + 515 && cyc < t + 640,
            $sformatf("single bunch: result at +%0d cycles", cyc - t));
      check_full("single bunch");
      if (result_full()) full++;
      while (cyc < t + 5200 - 600) begin
        next_result();
        check(real'(current) < 0.002 * CUR_EXP,
              $sformatf("single bunch: empty window reports %0d", current));
        quiet++;
      end
      check(quiet >= 8, $sformatf("single bunch: %0d empty windows", quiet));
      single = 0;
      if (full == 1) n_single++;
    end

    // ---- SRF gun at 100 kHz, with and without the trigger ------------------
    begin
      int partial, ok;
      real sum;
      partial = 0; ok = 0; sum = 0.0;
      fork
        begin : bunches
          forever begin
            @(negedge clk);
            bunch_trig = 1;
            b_start = cyc + 30;
            single = 1;
            repeat (10) @(negedge clk);
            bunch_trig = 0;
            repeat (520 - 11) @(negedge clk);
          end
        end
        begin
          repeat (5) next_result();
          repeat (30) begin
            next_result();
            check_full("SRF gun 100 kHz with trigger");
            if (result_full()) ok++;
          end
          bus_write(18'(REG_CTRL), 32'd0);     // bunch trigger off
          repeat (5) next_result();
          repeat (130) begin
            next_result();
            if (real'(current) < 0.99 * CUR_EXP) partial++;
            sum += real'(current);
          end
          disable bunches;
        end
      join
      check(ok == 30, $sformatf("SRF gun with trigger: %0d of 30 full windows", ok));
      check(partial >= 1, $sformatf("SRF gun free-running: %0d of 130 windows partial", partial));
      check(rabs(sum / 130.0 - CUR_EXP * 512.0 / 520.0) < 0.012 * CUR_EXP,
            $sformatf("SRF gun free-running: mean current %0.0f, expected %0.0f",
                      sum / 130.0, CUR_EXP * 512.0 / 520.0));
      if (ok == 30) n_srf++;
      if (partial >= 1) n_slip++;
    end

    check(n_cw == 9, $sformatf("CW modes run: %0d", n_cw));
    check(n_single == 5, $sformatf("single bunches seen: %0d", n_single));
    check(n_srf == 1 && n_slip == 1, "SRF gun workload");
    $display("workloads: cw=%0d single=%0d srf_trig=%0d srf_slip=%0d",
             n_cw, n_single, n_srf, n_slip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
