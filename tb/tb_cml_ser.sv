// tb_cml_ser: checks the double-data-rate output stage model. Random bit
// pairs are applied each clock; the line must carry the first bit of a pair
// in the high half and the second bit in the low half of the following clock
// period.
module tb_cml_ser;
  logic clk = 0, rst_n = 0;
  logic [1:0] d = '0;
  logic q;
  int checks = 0, failures = 0;

  cml_ser dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [1:0] prev;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    prev = '0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      prev = d;          // value taken at this edge
      d <= 2'($urandom);
      #2;
      checks++; if (q !== prev[1]) begin failures++; $display("FAIL high half"); end
      #5;
      checks++; if (q !== prev[0]) begin failures++; $display("FAIL low half"); end
    end
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
