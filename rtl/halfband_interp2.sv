// halfband_interp2: one x2 interpolation stage of the DAC reconstruction
// filter. It is a 7-tap half-band FIR, taps (-1 0 9 16 9 0 -1)/16, in polyphase
// form: every input sample (in_valid) is passed on unchanged as the even
// output (delayed by two inputs), and HALF_PERIOD clocks later the odd output
// is the midpoint estimate (-x[n-3] + 9 x[n-2] + 9 x[n-1] - x[n]) / 16, rounded
// and saturated. Inputs must arrive every 2*HALF_PERIOD clocks; outputs then
// arrive every HALF_PERIOD clocks, one clock after their tick. The use of
// half-band stages with simple rational coefficients follows the design; the
// coefficients (the design's own filter is not given) are the cubic
// Lagrange midpoint values chosen here.
module halfband_interp2 #(
  parameter int unsigned W           = 16,
  parameter int unsigned HALF_PERIOD = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  input  logic                in_valid,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  localparam int unsigned CW = $clog2(HALF_PERIOD + 1);
  localparam int unsigned AW = W + 6;

  logic signed [W-1:0]  h [4];
  logic signed [AW-1:0] acc, mid;
  logic [CW-1:0]        cnt;
  logic                 pending;

  assign acc = AW'(h[1]) * AW'(9) + AW'(h[2]) * AW'(9) - AW'(h[0]) - AW'(h[3]) + AW'(8);
  assign mid = acc >>> 4;

  function automatic logic signed [W-1:0] sat(logic signed [AW-1:0] v);
    if (v > AW'(2**(W-1) - 1))   return {1'b0, {(W-1){1'b1}}};
    if (v < -AW'(2**(W-1)))      return {1'b1, {(W-1){1'b0}}};
    return W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) h[k] <= '0;
      cnt     <= '0;
      pending <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        h[0]    <= x;
        h[1]    <= h[0];
        h[2]    <= h[1];
        h[3]    <= h[2];
        y       <= h[1];
        y_valid <= 1'b1;
        cnt     <= CW'(HALF_PERIOD - 1);
        pending <= 1'b1;
      end else if (pending) begin
        cnt <= cnt - 1'b1;
        if (cnt == '0) begin
          y       <= sat(mid);
          y_valid <= 1'b1;
          pending <= 1'b0;
        end
      end
    end
endmodule
