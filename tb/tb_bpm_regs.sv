// tb_bpm_regs: bus writes and reads of every register; control outputs
// (threshold, attenuator codes, playback, one-clock arm pulse, trigger
// enable, front DAC sources) and reset values; result and status inputs read back; the result
// counter; the sticky link-error bit and its clearing; the debug-memory window
// (address decoding, write strobe, read data path) and ack one clock after req.
module tb_bpm_regs;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req, we, ack;
  logic [17:0] addr;
  logic [31:0] wdata, rdata;
  logic [DIFF_W-1:0] threshold;
  logic [NCH-1:0][5:0] att_rf, att_if;
  logic playback, arm, trig_en;
  logic [NFRONT-1:0][2:0] front_sel;
  logic interlock, cap_done, link_locked, link_err, res_valid;
  logic signed [POS_W-1:0] hpos, vpos;
  logic [CUR_W-1:0] current, prev_current;
  logic signed [DIFF_W-1:0] fast_diff, slow_diff;
  logic [NCH-1:0][AMP_W-1:0] amp;
  logic [15:0] dbg_addr;
  logic dbg_we, dbg_rd;
  logic [ADC_W-1:0] dbg_wdata, dbg_rdata;
  int checks = 0, failures = 0;
  int arm_pulses;

  bpm_regs dut (.*);
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

  always @(negedge clk) if (arm) arm_pulses++;
  // simple memory behind the debug window: registered read
  logic [ADC_W-1:0] dmem [65536];
  always @(posedge clk) begin
    if (dbg_we) dmem[dbg_addr] <= dbg_wdata;
    dbg_rdata <= dmem[dbg_addr];
  end

  task automatic wr(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
    check(ack, "write ack");
  endtask

  task automatic rd(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    req = 1; we = 0; addr = a;
    @(negedge clk);
    req = 0;
    check(ack, "read ack");
    d = rdata;
  endtask

  initial begin
    logic [31:0] v;
    req = 0; we = 0; addr = '0; wdata = '0; arm_pulses = 0;
    interlock = 0; cap_done = 0; link_locked = 0; link_err = 0; res_valid = 0;
    hpos = -16'sd1234; vpos = 16'sd4321; current = 26'd12345678; prev_current = 26'd7654321;
    fast_diff = -27'sd55555; slow_diff = 27'sd66666;
    for (int c = 0; c < NCH; c++) amp[c] = AMP_W'(100000 * (c + 1));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // reset values
    check(threshold == DIFF_W'(65536) && att_rf == '1 && att_if == '1 && !playback && trig_en &&
          front_sel[0] == 0 && front_sel[1] == 2, "reset values");
    // control
    wr(REG_THRESH, 32'd777);
    check(threshold == DIFF_W'(777), "threshold");
    rd(REG_THRESH, v); check(v == 32'd777, "threshold readback");
    wr(REG_ATT_RF, {8'd0, 6'd4, 6'd3, 6'd2, 6'd1});
    check(att_rf[0] == 1 && att_rf[1] == 2 && att_rf[2] == 3 && att_rf[3] == 4, "RF attenuators");
    wr(REG_ATT_IF, {8'd0, 6'd63, 6'd0, 6'd10, 6'd20});
    check(att_if[0] == 20 && att_if[1] == 10 && att_if[2] == 0 && att_if[3] == 63, "IF attenuators");
    rd(REG_ATT_IF, v); check(v[23:0] == {6'd63, 6'd0, 6'd10, 6'd20}, "IF attenuator readback");
    wr(REG_FRONT, 32'h0000_0031);
    check(front_sel[0] == 1 && front_sel[1] == 3, "front DAC sources");
    rd(REG_FRONT, v); check(v == 32'h31, "front DAC source readback");
    wr(REG_CTRL, 32'b011);
    check(playback && !trig_en, "ctrl bits");
    repeat (3) @(negedge clk);
    check(arm_pulses == 1, "arm is a single pulse");
    rd(REG_CTRL, v); check(v[2:0] == 3'b001, "ctrl readback");
    wr(REG_CTRL, 32'b100);
    check(!playback && trig_en, "ctrl bits cleared");
    // results
    rd(REG_POS, v);     check(v == {16'(vpos), 16'(hpos)}, "positions");
    rd(REG_CURRENT, v); check(v == 32'd12345678, "current");
    rd(REG_FDIFF, v);   check($signed(v) == -32'sd55555, "fast diff");
    rd(REG_SDIFF, v);   check($signed(v) == 32'sd66666, "slow diff");
    rd(REG_PREV, v);    check(v == 32'd7654321, "preceding current");
    rd(REG_AMP2, v);    check(v == 32'd300000, "amplitude 2");
    // counter
    repeat (5) begin @(negedge clk) res_valid = 1; @(negedge clk) res_valid = 0; end
    rd(REG_COUNT, v);   check(v == 32'd5, "result counter");
    // status
    interlock = 1; link_locked = 1;
    @(negedge clk) link_err = 1;
    @(negedge clk) link_err = 0;
    rd(REG_STATUS, v);  check(v[3:0] == 4'b1101, "status with sticky error");
    wr(REG_STATUS, 0);
    rd(REG_STATUS, v);  check(v[3:0] == 4'b0101, "sticky error cleared");
    cap_done = 1;
    rd(REG_STATUS, v);  check(v[1], "capture done");
    // debug window
    wr(18'h20000 | 18'h0ABC, 32'h0000_BEEF);
    check(dmem[16'h0ABC] == 16'hBEEF, "debug write routed");
    rd(18'h20000 | 18'h0ABC, v); check(v == 32'h0000_BEEF, "debug read");
    rd(18'h00000 | 18'h0ABC, v); check(v != 32'h0000_BEEF, "register space is not the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
