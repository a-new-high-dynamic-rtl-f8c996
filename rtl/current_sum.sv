// current_sum: beam current signal as the sum of the four electrode
// amplitudes, registered one clock after in_valid. The sum is wide enough
// never to overflow. Summing the four amplitudes follows the design; the lack
// of a calibration factor to milliamperes (none is given) is this design's
// own choice, so the current is in units of ADC LSB/256.
module current_sum
  import bpm_pkg::*;
#(
  parameter int unsigned IN_W  = AMP_W,
  parameter int unsigned OUT_W = CUR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0][IN_W-1:0] amp,
  input  logic                 in_valid,
  output logic [OUT_W-1:0]     current,
  output logic                 cur_valid
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      current   <= '0;
      cur_valid <= 1'b0;
    end else begin
      cur_valid <= in_valid;
      if (in_valid)
        current <= OUT_W'(amp[0]) + OUT_W'(amp[1]) + OUT_W'(amp[2]) + OUT_W'(amp[3]);
    end
endmodule
