// tb_enc8b10b: checks the pipelined 8b/10b encoder against the reference
// tables of tb_8b10b_pkg. Random data with interleaved K28.1/K28.5/K28.7
// characters is fed one per enable strobe (every fifth cycle); each symbol
// must appear at the second strobe after it is taken and equal the reference symbol for
// the reference running disparity. Also checks that every symbol has 4, 5 or
// 6 ones, the D21.5 and K28.5 constants, and that all 256 data values occur.
module tb_enc8b10b;
  import tb_8b10b_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, k = 0;
  logic [7:0] data = '0;
  logic [9:0] sym;
  logic rd;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);
  always #5 clk = ~clk;

  logic [7:0] qd[$];
  logic       qk[$];

  initial begin
    logic ref_rd;
    logic [9:0] exp_sym;
    int ones;
    ref_rd = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] d; logic kk;
      if (i < 256) begin d = 8'(i); kk = 0; end
      else if (i % 7 == 0) begin
        kk = 1;
        case ($urandom_range(2)) 0: d = 8'h3C; 1: d = 8'hBC; default: d = 8'hFC; endcase
      end else begin d = 8'($urandom); kk = 0; end
      repeat (4) @(posedge clk);
      data <= d; k <= kk; en <= 1;
      @(posedge clk);
      en <= 0;
      qd.push_back(d); qk.push_back(kk);
      #1;
      if (qd.size() == 2) begin
        logic [7:0] od; logic ok;
        od = qd.pop_front(); ok = qk.pop_front();
        exp_sym = ref_enc(od, ok, ref_rd);
        checks++;
        if (sym !== exp_sym) begin failures++; $display("FAIL %s%h: got %b exp %b", ok ? "K" : "D", od, sym, exp_sym); end
        checks++;
        if (rd !== ref_rd) begin failures++; $display("FAIL rd after %h", od); end
        ones = $countones(sym);
        checks++;
        if (ones < 4 || ones > 6) begin failures++; $display("FAIL unbalanced %b", sym); end
        if (!ok && od == 8'hB5) begin checks++; if (sym !== 10'b1010101010) begin failures++; $display("FAIL D21.5"); end end
        if (ok && od == 8'hBC) begin
          checks++;
          if (sym !== 10'b0011111010 && sym !== 10'b1100000101) begin failures++; $display("FAIL K28.5 %b", sym); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
