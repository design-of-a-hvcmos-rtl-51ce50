// tb_ts_gen: checks the time stamp generator.
// A bunch-crossing strobe every 20 cycles; after each one ts must be the
// gray code of the number of strobes so far and ts_del the gray code of that
// number minus the latency, both mod 1024; successive ts values differ in one
// bit; tick marks the update. Runs past the 1024 wrap and changes the latency.
module tb_ts_gen;
  import tb_8b10b_pkg::gray;
  logic clk = 0, rst_n = 0, ce_bc = 0;
  logic [9:0] latency = 10'd43;
  logic [9:0] ts, ts_del;
  logic tick;
  int checks = 0, failures = 0;

  ts_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [9:0] prev;
    int n;
    n = 0;
    prev = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 1100; b++) begin
      repeat (19) @(posedge clk);
      ce_bc <= 1;
      @(posedge clk);
      ce_bc <= 0;
      n++;
      #1;
      checks++;
      if (!tick) begin failures++; $display("FAIL no tick at bc %0d", n); end
      checks++;
      if (ts !== gray(10'(n))) begin failures++; $display("FAIL ts %h exp %h", ts, gray(10'(n))); end
      checks++;
      if (ts_del !== gray(10'(n) - latency)) begin failures++; $display("FAIL ts_del %h exp %h", ts_del, gray(10'(n) - latency)); end
      checks++;
      if ($countones(ts ^ prev) != 1) begin failures++; $display("FAIL ts not gray step"); end
      prev = ts;
      @(posedge clk); #1;
      checks++;
      if (tick) begin failures++; $display("FAIL tick longer than one cycle"); end
      if (b == 600) latency = 10'd200;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
