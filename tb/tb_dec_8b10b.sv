// tb_dec_8b10b: all 256 data bytes in both running disparities and the comma
// in both forms are encoded with the code-table encoder and must decode back
// without error; a set of invalid 10-bit words must raise code_err.
module tb_dec_8b10b;
  import code8b10b_pkg::*;
  logic [9:0] code;
  logic [7:0] data;
  logic is_comma, code_err;
  int checks = 0, failures = 0;

  dec_8b10b dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] e;
    for (int r = 0; r < 2; r++)
      for (int d = 0; d < 256; d++) begin
        e = encode(8'(d), 1'b0, r[0]);
        code = e[9:0];
        #1;
        check(!code_err && !is_comma && data == 8'(d), $sformatf("D %02h rd %0d code %b -> %02h err %b", d, r, code, data, code_err));
      end
    code = 10'b0011111010; #1; check(is_comma && !code_err && data == 8'hBC, "K28.5-");
    code = 10'b1100000101; #1; check(is_comma && !code_err && data == 8'hBC, "K28.5+");
    code = 10'b0000000000; #1; check(code_err, "all zeros");
    code = 10'b1111111111; #1; check(code_err, "all ones");
    code = 10'b1111001010; #1; check(code_err, "111100 sub-block");
    code = 10'b1010101111; #1; check(code_err, "1111 sub-block");
    code = 10'b0000111010; #1; check(code_err, "000011 sub-block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
