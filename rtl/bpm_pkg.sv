// bpm_pkg: constants and widths shared by the BPM/DCM signal processing.
// The rates follow the design: 52 MSPS sampling, IF at 3/8 of the sample
// rate (19.5 MHz), 512-sample averaging windows (101.6 kHz results), x4
// interpolation to 406 kSPS for the DACs and a 10 Mbit/s 8b/10b current
// link. Number formats (fractional bits, word widths) are this design's own.
package bpm_pkg;
  localparam int unsigned ADC_W    = 16;   // ADC resolution
  localparam int unsigned NCH      = 4;    // electrodes: 0 left, 1 right, 2 top, 3 bottom
  localparam int unsigned AVG_N    = 512;  // samples per measurement window
  localparam int unsigned IQ_W     = 26;   // averaged I/Q, ADC LSB with 8 fraction bits
  localparam int unsigned AMP_W    = 24;   // amplitude, ADC LSB with 8 fraction bits
  localparam int unsigned CUR_W    = 26;   // sum of four amplitudes
  localparam int unsigned POS_W    = 16;   // position, signed Q1.15 of (a-b)/(a+b)
  localparam int unsigned DIFF_W   = 27;   // signed current difference
  localparam int unsigned DAC_W    = 16;   // DAC resolution
  localparam int unsigned NDAC     = 5;    // hpos, vpos, current, fast diff, slow diff
  localparam int unsigned NFRONT   = 2;    // front-panel DACs, each showing one of the NDAC
  localparam int unsigned DBG_DEPTH = 16384; // debug memory samples per channel

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic [AMP_W-1:0]        amp_t;

  // Register word addresses of bpm_regs (32-bit words).
  typedef enum logic [4:0] {
    REG_CTRL    = 5'h00,  // [0] playback, [1] arm capture (self-clearing), [2] trigger sync enable
    REG_STATUS  = 5'h01,  // [0] interlock, [1] capture done, [2] link locked, [3] link code error seen
    REG_THRESH  = 5'h02,  // DCM threshold on the integrated difference
    REG_ATT_RF  = 5'h03,  // 4 x 6-bit RF attenuator codes
    REG_ATT_IF  = 5'h04,  // 4 x 6-bit IF attenuator codes
    REG_POS     = 5'h05,  // {vpos, hpos}
    REG_CURRENT = 5'h06,  // beam current (sum)
    REG_FDIFF   = 5'h07,  // fast differential current
    REG_SDIFF   = 5'h08,  // slow (integrated) differential current
    REG_PREV    = 5'h09,  // preceding BPM current received over the link
    REG_COUNT   = 5'h0A,  // result counter
    REG_FRONT   = 5'h0B,  // front DAC sources: [2:0] front 0, [6:4] front 1 (index into the NDAC)
    REG_AMP0    = 5'h0C,
    REG_AMP1    = 5'h0D,
    REG_AMP2    = 5'h0E,
    REG_AMP3    = 5'h0F
  } reg_addr_e;
endpackage
