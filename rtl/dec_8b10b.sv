// dec_8b10b: combinational 8b/10b decoder. Each 6-bit and 4-bit sub-block is
// looked up against the code tables in both disparity forms; is_comma flags
// K28.5 in either form, code_err flags a sub-block that belongs to no data
// character (disparity violations are not checked). code[9] is bit 'a'.
// The 8b/10b line code follows the design; the decoder structure and the
// missing disparity check are this design's own choices.
module dec_8b10b
  import code8b10b_pkg::*;
(
  input  logic [9:0] code,
  output logic [7:0] data,
  output logic       is_comma,
  output logic       code_err
);
  logic [5:0] c6;
  logic [3:0] c4;
  logic       hit6, hit4;
  logic [4:0] x;
  logic [2:0] y;

  assign c6 = code[9:4];
  assign c4 = code[3:0];

  always_comb begin
    hit6 = 1'b0;
    x    = '0;
    for (int i = 0; i < 32; i++) begin
      logic [5:0] t;
      t = tab6(5'(i));
      if (c6 == t || ((ones6(t) != 3 || i == 7) && c6 == ~t)) begin
        hit6 = 1'b1;
        x    = 5'(i);
      end
    end
    hit4 = 1'b0;
    y    = '0;
    for (int j = 0; j < 8; j++) begin
      logic [3:0] t;
      t = tab4(3'(j));
      if (c4 == t || ((ones4(t) != 2 || j == 3) && c4 == ~t)) begin
        hit4 = 1'b1;
        y    = 3'(j);
      end
    end
    if (c4 == A7 || c4 == ~A7) begin
      hit4 = 1'b1;
      y    = 3'd7;
    end
  end

  assign is_comma = (code == K28_5_RDN) || (code == K28_5_RDP);
  assign data     = is_comma ? 8'hBC : {y, x};
  assign code_err = !is_comma && !(hit6 && hit4);
endmodule
