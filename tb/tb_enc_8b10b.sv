// tb_enc_8b10b: known code words (K28.5 and D0.0 in both disparities,
// D21.5, D10.2), then a long random stream of data and commas whose line
// properties are checked bit by bit: every character has disparity 0 or +-2
// and the running disparity stays within +-1 and matches the rd output; no run
// of more than 5 equal bits; K28.5's comma appears only where sent.
module tb_enc_8b10b;
  logic clk = 0, rst_n = 0;
  logic [7:0] data;
  logic k, en;
  logic [9:0] code;
  logic rd;
  int checks = 0, failures = 0;

  enc_8b10b dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] d, input logic kk);
    @(negedge clk);
    data = d; k = kk; en = 1;
    @(negedge clk);
    en = 0;
  endtask

  initial begin
    int rdis, run, ones;
    logic last_bit;
    logic [19:0] win;
    data = '0; k = 0; en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // After reset: rd positive
    check(rd == 1'b1, "reset disparity");
    send(8'hBC, 1); check(code == 10'b1100000101, "K28.5 RD+");
    send(8'hBC, 1); check(code == 10'b0011111010, "K28.5 RD-");
    send(8'h00, 0); check(code == 10'b0110001011, "D0.0 RD+");
    send(8'hBC, 1); check(code == 10'b1100000101, "K28.5 RD+ again");
    send(8'h00, 0); check(code == 10'b1001110100, "D0.0 RD-");
    send(8'hB5, 0); check(code == 10'b1010101010, "D21.5");
    send(8'h4A, 0); check(code == 10'b0101010101, "D10.2");
    // random stream
    rdis = rd ? 1 : -1; run = 0; last_bit = 0; win = '0;
    for (int n = 0; n < 3000; n++) begin
      logic kk;
      logic [7:0] d;
      kk = ($urandom % 8) == 0;
      d  = kk ? 8'hBC : 8'($urandom);
      send(d, kk);
      ones = 0;
      for (int b = 9; b >= 0; b--) begin
        ones += code[b];
        if (code[b] == last_bit) run++; else run = 1;
        last_bit = code[b];
        check(run <= 5, "run length");
        win = {win[18:0], code[b]};
      end
      check(ones == 5 || ones == 4 || ones == 6, "character disparity");
      if (ones == 6) begin check(rdis == -1, "+2 only from negative"); rdis = 1; end
      if (ones == 4) begin check(rdis == 1, "-2 only from positive"); rdis = -1; end
      check(rd == (rdis == 1), "rd output");
      check(kk == (code == 10'b0011111010 || code == 10'b1100000101), "comma only when sent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
