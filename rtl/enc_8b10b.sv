// enc_8b10b: registered 8b/10b encoder with running disparity. When en is
// high the character (data byte, or K28.5 when k is set) is encoded and
// appears on code one clock later. After reset code holds K28.5 in its
// negative-disparity form and rd is positive, as if that comma had just been
// encoded. code[9] is bit 'a', the first bit on the line. 8b/10b as the
// current-link line code follows the design; the implementation is the
// standard table-driven encoder.
module enc_8b10b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       k,
  input  logic       en,
  output logic [9:0] code,
  output logic       rd      // running disparity after the last character
);
  logic [10:0] e;
  assign e = encode(data, k, rd);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      code <= K28_5_RDN;
      rd   <= 1'b1;
    end else if (en) begin
      code <= e[9:0];
      rd   <= e[10];
    end
endmodule
