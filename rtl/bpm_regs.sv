// bpm_regs: memory-mapped register block between the soft CPU's bus and the
// signal processing. Bus: single request per transfer (req with we, word
// address and write data); ack pulses one clock after req, with rdata valid
// for reads. Word addresses below 2^(AW-1) select the registers of
// bpm_pkg::reg_addr_e (5-bit index); addresses with the top bit set form a
// window onto the debug memory, {channel, sample index} in the low bits.
// Control outputs: DCM threshold, the RF and IF attenuator codes of the four
// RF frontends (6 bits each: 1.25 dB + code * 0.25 dB, 1.25..17 dB),
// playback mode, capture arm (one-clock pulse), bunch-trigger enable and the
// sources of the two front-panel DACs (reset: horizontal position and beam
// current).
// Status bit 3 (link code error) is sticky and is cleared by writing STATUS.
// The register set follows what the design says passes over the bus
// (threshold, attenuators, status, result polling, debug memory); the
// addresses, bit fields and reset values are this design's own.
module bpm_regs
  import bpm_pkg::*;
#(
  parameter int unsigned AW           = 18,
  parameter int unsigned THRESH_RESET = 65536,
  parameter int unsigned DBG_AW       = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // bus
  input  logic                       req,
  input  logic                       we,
  input  logic [AW-1:0]              addr,
  input  logic [31:0]                wdata,
  output logic [31:0]                rdata,
  output logic                       ack,
  // control
  output logic [DIFF_W-1:0]          threshold,
  output logic [NCH-1:0][5:0]        att_rf,
  output logic [NCH-1:0][5:0]        att_if,
  output logic                       playback,
  output logic                       arm,
  output logic                       trig_en,
  output logic [NFRONT-1:0][2:0]     front_sel,
  // status and results
  input  logic                       interlock,
  input  logic                       cap_done,
  input  logic                       link_locked,
  input  logic                       link_err,
  input  logic                       res_valid,
  input  logic signed [POS_W-1:0]    hpos,
  input  logic signed [POS_W-1:0]    vpos,
  input  logic [CUR_W-1:0]           current,
  input  logic signed [DIFF_W-1:0]   fast_diff,
  input  logic signed [DIFF_W-1:0]   slow_diff,
  input  logic [CUR_W-1:0]           prev_current,
  input  logic [NCH-1:0][AMP_W-1:0]  amp,
  // debug memory window
  output logic [DBG_AW-1:0]          dbg_addr,
  output logic                       dbg_we,
  output logic                       dbg_rd,
  output logic [ADC_W-1:0]           dbg_wdata,
  input  logic [ADC_W-1:0]           dbg_rdata
);
  logic        is_dbg, is_dbg_q, rd_q;
  logic [4:0]  ra, ra_q;
  logic        err_sticky;
  logic [31:0] count;
  logic [31:0] reg_rd;

  assign is_dbg    = addr[AW-1];
  assign ra        = addr[4:0];
  assign dbg_addr  = DBG_AW'(addr);
  assign dbg_we    = req && we && is_dbg;
  assign dbg_rd    = req && !we && is_dbg;
  assign dbg_wdata = wdata[ADC_W-1:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      threshold  <= DIFF_W'(THRESH_RESET);
      att_rf     <= '1;
      att_if     <= '1;
      playback   <= 1'b0;
      arm        <= 1'b0;
      trig_en    <= 1'b1;
      front_sel  <= {3'd2, 3'd0};
      err_sticky <= 1'b0;
      count      <= '0;
      ack        <= 1'b0;
      rd_q       <= 1'b0;
      is_dbg_q   <= 1'b0;
      ra_q       <= '0;
    end else begin
      arm      <= 1'b0;
      ack      <= req;
      rd_q     <= req && !we;
      is_dbg_q <= is_dbg;
      ra_q     <= ra;
      if (res_valid) count <= count + 1'b1;
      if (link_err)  err_sticky <= 1'b1;
      if (req && we && !is_dbg) begin
        unique case (ra)
          REG_CTRL: begin
            playback <= wdata[0];
            arm      <= wdata[1];
            trig_en  <= wdata[2];
          end
          REG_STATUS: err_sticky <= 1'b0;
          REG_THRESH: threshold <= wdata[DIFF_W-1:0];
          REG_ATT_RF: for (int c = 0; c < NCH; c++) att_rf[c] <= wdata[6*c +: 6];
          REG_ATT_IF: for (int c = 0; c < NCH; c++) att_if[c] <= wdata[6*c +: 6];
          REG_FRONT:  for (int f = 0; f < NFRONT; f++) front_sel[f] <= wdata[4*f +: 3];
          default: ;
        endcase
      end
    end

  always_comb begin
    reg_rd = '0;
    unique case (ra_q)
      REG_CTRL:    reg_rd = {29'd0, trig_en, 1'b0, playback};
      REG_STATUS:  reg_rd = {28'd0, err_sticky, link_locked, cap_done, interlock};
      REG_THRESH:  reg_rd = 32'(threshold);
      REG_ATT_RF:  reg_rd = 32'(att_rf);
      REG_ATT_IF:  reg_rd = 32'(att_if);
      REG_POS:     reg_rd = {vpos, hpos};
      REG_CURRENT: reg_rd = 32'(current);
      REG_FDIFF:   reg_rd = 32'(fast_diff);
      REG_SDIFF:   reg_rd = 32'(slow_diff);
      REG_PREV:    reg_rd = 32'(prev_current);
      REG_COUNT:   reg_rd = count;
      REG_FRONT:   reg_rd = {25'd0, front_sel[1], 1'b0, front_sel[0]};
      REG_AMP0:    reg_rd = 32'(amp[0]);
      REG_AMP1:    reg_rd = 32'(amp[1]);
      REG_AMP2:    reg_rd = 32'(amp[2]);
      REG_AMP3:    reg_rd = 32'(amp[3]);
      default:     reg_rd = 32'hDEAD_BEEF;
    endcase
  end

  assign rdata = !rd_q ? '0 : is_dbg_q ? 32'(dbg_rdata) : reg_rd;

  // Bus rule: one transfer at a time, so ack never coincides with req.
  a_single_req: assert property (@(posedge clk) disable iff (!rst_n) req |=> !req);
endmodule
