// tb_debug_mem: small memory (64 samples per channel). Capture: after arm,
// recording starts at the trigger and keeps 64 consecutive samples of each
// channel (checked by reading back through the bus port); done rises after
// exactly 64 samples. Playback: a pattern written through the bus is read
// out cyclically, one sample per clock, from address 0.
module tb_debug_mem;
  import bpm_pkg::*;
  localparam int unsigned D = 64, NC = 4;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0][ADC_W-1:0] samples, play_sample;
  logic arm, trig, capturing, done, play_en, bus_we, bus_rd;
  logic [$clog2(NC*D)-1:0] bus_addr;
  logic [ADC_W-1:0] bus_wdata, bus_rdata;
  int checks = 0, failures = 0;
  int cyc, trig_cyc;

  debug_mem #(.DEPTH(D), .NC(NC)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  // sample value encodes channel and clock
  always_comb for (int c = 0; c < NC; c++) samples[c] = ADC_W'(c * 4096 + (cyc % 4096));

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

  task automatic bus_read(input int ch, input int idx, output logic [ADC_W-1:0] v);
    @(negedge clk);
    bus_addr = ($clog2(NC*D))'(ch * D + idx); bus_rd = 1;
    @(negedge clk);
    bus_rd = 0;
    v = bus_rdata;
  endtask

  initial begin
    logic [ADC_W-1:0] v;
    int t_done;
    arm = 0; trig = 0; play_en = 0; bus_we = 0; bus_rd = 0; bus_addr = '0; bus_wdata = '0; cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // trigger without arm: nothing happens
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    check(!capturing && !done, "no capture without arm");
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    repeat (7) @(negedge clk);
    trig = 1; trig_cyc = cyc;     // sample of clock trig_cyc is the first one kept
    @(negedge clk) trig = 0;
    t_done = -1;
    for (int k = 0; k < D + 5; k++) begin
      @(negedge clk);
      if (done && t_done < 0) t_done = cyc;
    end
    check(t_done - trig_cyc == D, $sformatf("capture length %0d", t_done - trig_cyc));
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < D; i += 7) begin
        bus_read(c, i, v);
        check(v == ADC_W'(c * 4096 + ((trig_cyc + i) % 4096)), $sformatf("capture ch%0d[%0d] = %0d", c, i, v));
      end
    // load a stimulus and play it back
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < D; i++) begin
        @(negedge clk);
        bus_addr = ($clog2(NC*D))'(c * D + i); bus_we = 1; bus_wdata = ADC_W'(1000 * c + 3 * i);
      end
    @(negedge clk) bus_we = 0;
    @(negedge clk) play_en = 1;
    for (int k = 0; k < 2 * D; k++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++)
        check(play_sample[c] == ADC_W'(1000 * c + 3 * (k % D)), $sformatf("playback ch%0d k%0d = %0d", c, k, play_sample[c]));
    end
    play_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
