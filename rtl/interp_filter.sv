// interp_filter: multirate reconstruction filter ahead of one DAC. Two
// half-band x2 stages raise the result rate by 4, from one sample every
// RES_PERIOD clocks (101.6 kSPS at 52 MHz) to one every RES_PERIOD/4 clocks
// (406 kSPS); the DAC's own x16 CIC interpolation then reaches 6.5 MSPS.
// Input: x with in_valid every RES_PERIOD clocks. Output: y with y_valid
// every RES_PERIOD/4 clocks. Delay: about two input periods for stage 1 plus
// two stage-2 input periods (about 30 us at the default rates). The rates
// follow the design; the stage coefficients are this design's own (see
// halfband_interp2).
module interp_filter #(
  parameter int unsigned W          = 16,
  parameter int unsigned RES_PERIOD = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  input  logic                in_valid,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  logic signed [W-1:0] y1;
  logic                v1;

  halfband_interp2 #(.W(W), .HALF_PERIOD(RES_PERIOD / 2)) u_stage1 (
    .clk, .rst_n, .x, .in_valid, .y(y1), .y_valid(v1)
  );
  halfband_interp2 #(.W(W), .HALF_PERIOD(RES_PERIOD / 4)) u_stage2 (
    .clk, .rst_n, .x(y1), .in_valid(v1), .y, .y_valid
  );
endmodule
