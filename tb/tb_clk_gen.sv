// tb_clk_gen: checks the divided clocks and strobes of clk_gen.
// Over 400 input cycles the 400/200/160 MHz clocks must rise 200/100/80
// times, each strobe must precede a rising edge of its clock, the 160 MHz
// clock must be high for 2.5 of its 5 input cycles, and the bunch-crossing
// strobe must come every 20 cycles.
module tb_clk_gen;
  logic clk = 0, rst_n = 0;
  logic clk_400, clk_200, clk_160, ce_400, ce_200, ce_160, ce_bc;
  int checks = 0, failures = 0;
  int cyc = 0;

  clk_gen dut (.*);

  always #5 clk = ~clk;

  int rise400 = 0, rise200 = 0, rise160 = 0, nbc = 0, last_bc = -1;
  int hi160_half = 0;
  logic p400, p200, p160;
  logic q400, q200, q160;   // strobes seen in the previous cycle

  // sample every half period for duty cycle
  always @(clk) if (rst_n && cyc >= 20 && cyc < 420) hi160_half += int'(clk_160);

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      cyc++;
      if (cyc >= 20 && cyc < 420) begin
        if (clk_400 && !p400) begin rise400++; checks++; if (!q400) begin failures++; $display("FAIL 400 rose without strobe"); end end
        if (clk_200 && !p200) begin rise200++; checks++; if (!q200) begin failures++; $display("FAIL 200 rose without strobe"); end end
        if (clk_160 && !p160) begin rise160++; checks++; if (!q160) begin failures++; $display("FAIL 160 rose without strobe"); end end
        if (ce_bc) begin
          nbc++;
          checks++;
          if (!ce_160) begin failures++; $display("FAIL bc strobe without word strobe"); end
          if (last_bc >= 0) begin checks++; if (cyc - last_bc != 20) begin failures++; $display("FAIL bc spacing %0d", cyc - last_bc); end end
          last_bc = cyc;
        end
        if (ce_160 && ce_200) begin checks++; if (!ce_400) begin failures++; $display("FAIL strobes not aligned"); end end
      end
    end
    p400 = clk_400; p200 = clk_200; p160 = clk_160;
    q400 = ce_400;  q200 = ce_200;  q160 = ce_160;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cyc == 430);
    checks++; if (rise400 != 200) begin failures++; $display("FAIL 400 rises %0d", rise400); end
    checks++; if (rise200 != 100) begin failures++; $display("FAIL 200 rises %0d", rise200); end
    checks++; if (rise160 != 80)  begin failures++; $display("FAIL 160 rises %0d", rise160); end
    checks++; if (nbc != 20)      begin failures++; $display("FAIL bc count %0d", nbc); end
    checks++; if (hi160_half != 400) begin failures++; $display("FAIL 160 duty %0d/800 half cycles", hi160_half); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
