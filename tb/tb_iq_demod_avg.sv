// tb_iq_demod_avg: feeds sine waves at 3/8 of the sample rate with several
// amplitudes and phases and checks that sqrt(i^2+q^2) equals the amplitude
// (x256) within 0.2 %, that the I/Q phase follows the input phase, that DC and
// the second harmonic are rejected, and that iq_valid comes 2 clocks after
// the last sample of the window.
module tb_iq_demod_avg;
  import bpm_pkg::*;
  localparam int unsigned N = 512;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] sample;
  logic win_start, win_last;
  logic signed [IQ_W-1:0] i_out, q_out;
  logic iq_valid;
  int checks = 0, failures = 0;
  int last_at, cyc;

  iq_demod_avg dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

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

  // One window of x = a*cos(2*pi*m/8*cyc + ph) + dc. The DUT's LO phase advances
  // every clock, as cyc does, so relative phases between windows are kept.
  task automatic window(input real a, input real ph, input int m, input real dc,
                        output real amp, output real ang);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      sample    = ADC_W'($rtoi($floor(a * $cos(2.0 * PI * m / 8.0 * cyc + ph) + dc + 0.5)));
      win_start = (k == 0);
      win_last  = (k == N - 1);
      if (k == N - 1) last_at = cyc;
    end
    @(negedge clk);
    win_start = 0; win_last = 0; sample = '0;
    @(posedge iq_valid);
    check(cyc - last_at == 2, $sformatf("latency %0d", cyc - last_at));
    amp = $sqrt(real'(i_out) * real'(i_out) + real'(q_out) * real'(q_out)) / 256.0;
    ang = $atan2(-real'(q_out), real'(i_out));
  endtask

  initial begin
    real amp, ang, amps[4], phs[4];
    amps = '{30000.0, 1000.0, 50.0, 12345.0};
    phs  = '{0.0, 0.7, -2.0, 3.0};
    sample = '0; win_start = 0; win_last = 0; cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      window(amps[t], phs[t], 3, 0.0, amp, ang);
      check(rabs(amp - amps[t]) <= 0.002 * amps[t] + 0.5,
            $sformatf("amplitude %f expected %f", amp, amps[t]));
    end
    // phase: relative phase between two windows at the same timing offset
    begin
      real a0, a1;
      window(20000.0, 0.0, 3, 0.0, amp, a0);
      window(20000.0, 1.0, 3, 0.0, amp, a1);
      check(rabs(a1 - a0 - 1.0) < 0.01 || rabs(a1 - a0 - 1.0 + 2 * PI) < 0.01 ||
            rabs(a1 - a0 - 1.0 - 2 * PI) < 0.01, $sformatf("phase step %f", a1 - a0));
    end
    // rejection of DC and of the second harmonic (6/8 fs)
    window(0.0, 0.0, 3, 20000.0, amp, ang);
    check(amp < 0.05, $sformatf("DC leak %f", amp));
    window(20000.0, 0.3, 6, 0.0, amp, ang);
    check(amp < 0.05, $sformatf("2nd harmonic leak %f", amp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
