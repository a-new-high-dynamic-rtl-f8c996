// code8b10b_pkg: code tables of the standard 8b/10b line code (5b/6b and
// 3b/4b sub-blocks) shared by enc_8b10b and dec_8b10b. Codes are written as
// {a,b,c,d,e,i} and {f,g,h,j}, 'a' first on the line, in the form used when
// the running disparity is negative; the positive-disparity form is the
// complement for every unbalanced code and for D.7 / D.x.3. Only the comma
// character K28.5 is used as a control character.
package code8b10b_pkg;
  localparam logic [9:0] K28_5_RDN = 10'b001111_1010;
  localparam logic [9:0] K28_5_RDP = 10'b110000_0101;

  function automatic logic [5:0] tab6(input logic [4:0] x);
    logic [5:0] t [32];
    t = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
          6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
          6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
          6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011};
    return t[x];
  endfunction

  // 3b/4b, index 0..7 with the primary D.x.7 code; the alternate one is A7.
  function automatic logic [3:0] tab4(input logic [2:0] y);
    logic [3:0] t [8];
    t = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
    return t[y];
  endfunction
  localparam logic [3:0] A7 = 4'b0111;

  function automatic int unsigned ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction
  function automatic int unsigned ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Encode one character. rd: running disparity before it (1 = positive).
  // Returns {new_rd, code[9:0]}.
  function automatic logic [10:0] encode(input logic [7:0] d, input logic k, input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6, rd4;
    x = d[4:0];
    y = d[7:5];
    if (k) begin
      // K28.5 only
      if (rd) return {1'b0, K28_5_RDP};
      return {1'b1, K28_5_RDN};
    end
    c6  = tab6(x);
    rd6 = rd;
    if (ones6(c6) != 3) begin
      if (rd) c6 = ~c6;
      rd6 = !rd;
    end else if (x == 5'd7 && rd) begin
      c6 = ~c6;
    end
    if (y == 3'd7 && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                      ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
      c4 = A7;
    else
      c4 = tab4(y);
    rd4 = rd6;
    if (ones4(c4) != 2) begin
      if (rd6) c4 = ~c4;
      rd4 = !rd6;
    end else if (y == 3'd3 && rd6) begin
      c4 = ~c4;
    end
    return {rd4, c6, c4};
  endfunction
endpackage
