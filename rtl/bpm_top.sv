// bpm_top: FPGA signal processing of one beam position monitor with built-in
// differential current monitor (DCM), on the 52 MHz ADC clock.
// Path: the four 16-bit IF sample streams (electrodes left, right, top,
// bottom; or the debug memory in playback mode) are I/Q-demodulated and
// averaged over 512-sample windows (timing_gen, iq_demod_avg), giving one
// result set per window (101.6 kHz). Each channel's amplitude
// (amplitude_calc) feeds the horizontal and vertical positions, difference
// over sum (position_calc), and the beam current, the sum of all four
// (current_sum). The current goes to the following BPM over the 8b/10b
// optical link (pof_link_tx) and, with the preceding BPM's current from the
// receiver (pof_link_rx), into the DCM (dcm): difference, 100 ms integrator,
// threshold comparison, interlock. Five results are interpolated x4 to
// 406 kSPS (interp_filter) and sent to serial DACs (dac_serial): horizontal
// and vertical position, beam current, fast and slow current difference.
// Two more serial DACs on the front panel repeat any two of these five,
// chosen over the bus (the choice of signals is this design's own).
// The soft CPU reaches everything through a register bus (bpm_regs), which
// also sets the RF-frontend attenuators and drives the raw-sample debug
// memory (debug_mem).
// All processing runs on one clock; the 101.6 kHz and 406 kHz stages of the
// design are realised with valid strobes instead of their own clocks. DAC
// words are two's complement; currents and differences are scaled to the
// 16-bit DAC range by right shifts with saturation (CUR_DAC_SHIFT,
// DIFF_DAC_SHIFT), which are this design's own choices, as are all number
// formats. Results appear about 50 clocks after the last sample of a window.
module bpm_top
  import bpm_pkg::*;
#(
  parameter int unsigned WIN_LEN        = AVG_N,
  parameter int unsigned TAU_SAMPLES    = 10156,
  parameter int unsigned DEPTH          = DBG_DEPTH,
  parameter int unsigned CUR_DAC_SHIFT  = 10,
  parameter int unsigned DIFF_DAC_SHIFT = 4,
  parameter int unsigned BUS_AW         = 18
) (
  input  logic                          clk,          // 52 MHz ADC clock
  input  logic                          rst_n,
  input  logic [NCH-1:0][ADC_W-1:0]     adc_data,     // 0 left, 1 right, 2 top, 3 bottom
  input  logic                          bunch_trig,
  // current link
  input  logic                          link_rx,      // from the preceding BPM
  output logic                          link_tx,      // to the following BPM
  // machine protection
  output logic                          interlock,
  // DACs
  output logic [NDAC-1:0]               dac_sclk,
  output logic [NDAC-1:0]               dac_sdata,
  output logic [NDAC-1:0]               dac_fsync,
  output logic [NFRONT-1:0]             front_sclk,   // front-panel DACs
  output logic [NFRONT-1:0]             front_sdata,
  output logic [NFRONT-1:0]             front_fsync,
  // RF frontend attenuators
  output logic [NCH-1:0][5:0]           att_rf,
  output logic [NCH-1:0][5:0]           att_if,
  // CPU bus
  input  logic                          bus_req,
  input  logic                          bus_we,
  input  logic [BUS_AW-1:0]             bus_addr,
  input  logic [31:0]                   bus_wdata,
  output logic [31:0]                   bus_rdata,
  output logic                          bus_ack,
  // results (also readable over the bus)
  output logic                          res_valid,
  output logic signed [POS_W-1:0]       hpos,
  output logic signed [POS_W-1:0]       vpos,
  output logic [CUR_W-1:0]              current,
  output logic signed [DIFF_W-1:0]      fast_diff,
  output logic signed [DIFF_W-1:0]      slow_diff
);
  localparam int unsigned DBG_AW = $clog2(NCH * DEPTH);

  // ---- sample source --------------------------------------------------
  logic [NCH-1:0][ADC_W-1:0] adc_q, play_sample, proc_in;
  logic                      playback, arm, trig_en, cap_done, capturing;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) adc_q <= '0;
    else        adc_q <= adc_data;

  assign proc_in = playback ? play_sample : adc_q;

  // ---- timing ---------------------------------------------------------
  logic win_start, win_last, win_abort, tick_res;

  timing_gen #(.WIN_LEN(WIN_LEN)) u_timing (
    .clk, .rst_n, .bunch_trig, .trig_en,
    .win_start, .win_last, .win_abort, .tick_res
  );

  // ---- per-channel demodulation and amplitude -------------------------
  logic signed [IQ_W-1:0] ch_i [NCH];
  logic signed [IQ_W-1:0] ch_q [NCH];
  logic [NCH-1:0]         iq_valid, amp_valid;
  logic [NCH-1:0][AMP_W-1:0] amp;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    iq_demod_avg #(.WIN_LEN(WIN_LEN)) u_iq (
      .clk, .rst_n, .sample(proc_in[c]), .win_start, .win_last,
      .i_out(ch_i[c]), .q_out(ch_q[c]), .iq_valid(iq_valid[c])
    );
    amplitude_calc u_amp (
      .clk, .rst_n, .i_in(ch_i[c]), .q_in(ch_q[c]), .in_valid(iq_valid[c]),
      .amp(amp[c]), .amp_valid(amp_valid[c]), .busy()
    );
  end

  // ---- position and current -------------------------------------------
  logic hpos_valid, vpos_valid, cur_valid;

  position_calc u_hpos (
    .clk, .rst_n, .a(amp[0]), .b(amp[1]), .in_valid(amp_valid[0]),
    .pos(hpos), .pos_valid(hpos_valid)
  );
  position_calc u_vpos (
    .clk, .rst_n, .a(amp[2]), .b(amp[3]), .in_valid(amp_valid[2]),
    .pos(vpos), .pos_valid(vpos_valid)
  );
  current_sum u_sum (
    .clk, .rst_n, .amp, .in_valid(amp_valid[0]), .current, .cur_valid
  );

  // ---- current link and DCM -------------------------------------------
  logic [CUR_W-1:0]  prev_current;
  logic              prev_valid, link_locked, link_err, diff_valid;
  logic [DIFF_W-1:0] threshold;

  pof_link_tx #(.W(CUR_W)) u_link_tx (
    .clk, .rst_n, .cur(current), .cur_valid, .tx(link_tx), .frame_sent()
  );
  pof_link_rx #(.W(CUR_W)) u_link_rx (
    .clk, .rst_n, .rx(link_rx), .cur(prev_current), .cur_valid(prev_valid),
    .locked(link_locked), .code_err(link_err)
  );
  dcm #(.CW(CUR_W), .TAU_SAMPLES(TAU_SAMPLES)) u_dcm (
    .clk, .rst_n, .own_current(current), .cur_valid, .prev_current,
    .threshold, .fast_diff, .slow_diff, .diff_valid, .interlock
  );

  // A result set is complete when the positions are out: the dividers take
  // 16 clocks, longer than the current sum and the DCM (2 clocks).
  assign res_valid = hpos_valid;

  // ---- interpolation filters and DACs ----------------------------------
  function automatic logic signed [DAC_W-1:0] sat16(input logic signed [DIFF_W:0] v);
    if (v > (DIFF_W+1)'(2**(DAC_W-1) - 1)) return {1'b0, {(DAC_W-1){1'b1}}};
    if (v < -(DIFF_W+1)'(2**(DAC_W-1)))    return {1'b1, {(DAC_W-1){1'b0}}};
    return DAC_W'(v);
  endfunction

  logic signed [NDAC-1:0][DAC_W-1:0] dac_in;
  assign dac_in[0] = hpos;
  assign dac_in[1] = vpos;
  assign dac_in[2] = sat16($signed({1'b0, (DIFF_W)'(current)}) >>> CUR_DAC_SHIFT);
  assign dac_in[3] = sat16((DIFF_W+1)'(fast_diff) >>> DIFF_DAC_SHIFT);
  assign dac_in[4] = sat16((DIFF_W+1)'(slow_diff) >>> DIFF_DAC_SHIFT);

  logic [NDAC-1:0][DAC_W-1:0] dac_y;
  logic [NDAC-1:0]            dac_y_valid;
  logic [NFRONT-1:0][2:0]     front_sel;

  for (genvar d = 0; d < NDAC; d++) begin : g_dac
    logic signed [DAC_W-1:0] y;
    logic                    y_valid;
    interp_filter #(.W(DAC_W), .RES_PERIOD(WIN_LEN)) u_interp (
      .clk, .rst_n, .x(dac_in[d]), .in_valid(tick_res), .y, .y_valid
    );
    assign dac_y[d]       = y;
    assign dac_y_valid[d] = y_valid;
    dac_serial #(.BITS(DAC_W), .CLK_DIV(WIN_LEN / 4 / DAC_W)) u_dac (
      .clk, .rst_n, .word(y), .load(y_valid),
      .sclk(dac_sclk[d]), .sdata(dac_sdata[d]), .fsync(dac_fsync[d])
    );
  end

  // front panel: a copy of the selected interpolated stream (out-of-range
  // selections show channel 0)
  for (genvar f = 0; f < NFRONT; f++) begin : g_front
    logic [DAC_W-1:0] w;
    assign w = (front_sel[f] < 3'(NDAC)) ? dac_y[front_sel[f]] : dac_y[0];
    dac_serial #(.BITS(DAC_W), .CLK_DIV(WIN_LEN / 4 / DAC_W)) u_dac (
      .clk, .rst_n, .word(w), .load(dac_y_valid[0]),
      .sclk(front_sclk[f]), .sdata(front_sdata[f]), .fsync(front_fsync[f])
    );
  end

  // ---- registers and debug memory --------------------------------------
  logic [DBG_AW-1:0] dbg_addr;
  logic              dbg_we, dbg_rd;
  logic [ADC_W-1:0]  dbg_wdata, dbg_rdata;

  bpm_regs #(.AW(BUS_AW), .DBG_AW(DBG_AW)) u_regs (
    .clk, .rst_n,
    .req(bus_req), .we(bus_we), .addr(bus_addr), .wdata(bus_wdata),
    .rdata(bus_rdata), .ack(bus_ack),
    .threshold, .att_rf, .att_if, .playback, .arm, .trig_en, .front_sel,
    .interlock, .cap_done, .link_locked, .link_err, .res_valid,
    .hpos, .vpos, .current, .fast_diff, .slow_diff, .prev_current, .amp,
    .dbg_addr, .dbg_we, .dbg_rd, .dbg_wdata, .dbg_rdata
  );

  debug_mem #(.DEPTH(DEPTH), .NC(NCH)) u_dbg (
    .clk, .rst_n, .samples(adc_q), .arm, .trig(win_start),
    .capturing, .done(cap_done), .play_en(playback), .play_sample,
    .bus_addr(dbg_addr), .bus_we(dbg_we), .bus_rd(dbg_rd),
    .bus_wdata(dbg_wdata), .bus_rdata(dbg_rdata)
  );
endmodule
