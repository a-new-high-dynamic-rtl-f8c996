// tb_dac_serial: loads a word every 128 clocks and decodes the serial pins
// like a DAC would: bits are taken on sclk rising edges, fsync marks the MSB.
// Every decoded word must match the loaded one (the last one repeated when no
// new word is loaded), the bit period must be 8
// clocks (6.5 Mbit/s at 52 MHz) and words must follow each other without gaps.
module tb_dac_serial;
  localparam int unsigned BITS = 16, DIV = 8;
  logic clk = 0, rst_n = 0;
  logic [BITS-1:0] word;
  logic load, sclk, sdata, fsync;
  int checks = 0, failures = 0;
  int cyc, last_rise, nbits, nwords;
  logic sclk_d;
  logic [BITS-1:0] sh;
  logic [BITS-1:0] sent[$];
  logic [BITS-1:0] last_word;

  dac_serial #(.BITS(BITS), .CLK_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // DAC model, sampling the pins between clock edges
  always @(negedge clk) begin
    sclk_d <= sclk;
    if (rst_n && sclk && !sclk_d) begin
      if (last_rise >= 0) check(cyc - last_rise == DIV, $sformatf("bit period %0d", cyc - last_rise));
      last_rise = cyc;
      if (fsync) begin
        check(nbits == 0 || nbits == BITS, "frame length");
        nbits = 0;
      end
      sh = {sh[BITS-2:0], sdata};
      nbits++;
      if (nbits == BITS) begin
        logic [BITS-1:0] e;
        // without a new load the last word is repeated
        e = (sent.size() > 0) ? sent.pop_front() : last_word;
        last_word = e;
        check(sh == e, $sformatf("cyc %0d word %h expected %h", cyc, sh, e));
        nwords++;
      end
    end
  end

  initial begin
    word = '0; load = 0; cyc = 0; last_rise = -1; nbits = 0; nwords = 0; sclk_d = 0; sh = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 100; k++) begin
      word = (k == 0) ? 16'h8001 : BITS'($urandom);
      load = 1;
      sent.push_back(word);
      @(negedge clk);
      load = 0;
      repeat (BITS * DIV - 1) @(negedge clk);
    end
    repeat (BITS * DIV + 4) @(negedge clk);
    check(nwords >= 99, $sformatf("words received %0d", nwords));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
