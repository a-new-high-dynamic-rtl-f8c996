// dcm_integrator: first-order integrator (low-pass) of the DCM current
// difference with time constant TAU_SAMPLES result periods,
//   y[n] = y[n-1] + (x[n] - y[n-1]) / TAU_SAMPLES.
// The state keeps FRAC extra fraction bits; 1/TAU_SAMPLES is the constant
// ALPHA = round(2^30 / TAU_SAMPLES). A step of height h reaches 63 % of h after
// TAU_SAMPLES updates, so a large loss crosses a fixed threshold sooner than a
// small one. Update on every in_valid; y_valid one clock later. The 100 ms
// time constant follows the design (100 ms at 101.6 kHz = 10156 results); the
// first-order form and fixed-point scaling are this design's own.
module dcm_integrator
  import bpm_pkg::*;
#(
  parameter int unsigned W           = DIFF_W,
  parameter int unsigned TAU_SAMPLES = 10156
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  input  logic                in_valid,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  localparam int unsigned FRAC = 16;
  localparam int unsigned SW   = W + FRAC + 1;
  localparam longint ALPHA = ((64'sd1 <<< 30) + longint'(TAU_SAMPLES) / 2) / longint'(TAU_SAMPLES);

  logic signed [SW-1:0] s;
  logic signed [SW:0]   err;
  localparam int unsigned PW = SW + 1 + 32;
  logic signed [PW-1:0] prod, step;

  assign err  = (SW+1)'(x) * (SW+1)'(2**FRAC) - (SW+1)'(s);
  assign prod = PW'(err) * PW'(ALPHA);
  assign step = prod >>> 30;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s       <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        s <= s + SW'(step);
        y <= W'((s + SW'(step)) >>> FRAC);
      end
    end
endmodule
