// tb_serializer: checks the 10-to-2 MUX-tree serializer.
// The strobes are made here from a 0..19 phase counter (160 MHz every 5th,
// 200 MHz every 4th, 400 MHz every 2nd cycle, all together at phase 0).
// Random 10-bit words are presented one per 160 MHz strobe, preceded by a
// marker word; the 2-bit output is collected into a bit stream, the marker
// is located, and every following word must appear in order, bit 9 first.
// The distance from marker input to marker output must be a fixed number of
// cycles.
module tb_serializer;
  logic clk = 0, rst_n = 0;
  logic ce_160, ce_200, ce_400;
  logic [9:0] word = '0;
  logic [1:0] dout;
  int checks = 0, failures = 0;

  serializer dut (.*);
  always #5 clk = ~clk;

  int ph = 0;
  always @(posedge clk) if (rst_n) ph <= (ph + 1) % 20;
  assign ce_160 = rst_n && (ph % 5 == 0);
  assign ce_200 = rst_n && (ph % 4 == 0);
  assign ce_400 = rst_n && (ph % 2 == 0);

  localparam logic [9:0] MARK = 10'b0011111010;
  localparam int NW = 400;
  logic [9:0] sent[NW];
  bit stream[$];
  int mark_in_cyc = -1, cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      stream.push_back(dout[1]);
      stream.push_back(dout[0]);
    end
  end

  initial begin
    int idx, pos, found;
    for (int i = 0; i < NW; i++) sent[i] = 10'($urandom);
    sent[0] = MARK;
    // keep the marker unique among aligned words
    for (int i = 1; i < NW; i++) if (sent[i] == MARK) sent[i] = 10'h000;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // zeros for a while, then the words
    idx = -20;
    while (idx < NW) begin
      @(posedge clk);
      if (ce_160) begin
        word <= (idx >= 0) ? sent[idx] : 10'h000;
        if (idx == 0) mark_in_cyc = cyc;
        idx++;
      end
    end
    repeat (100) @(posedge clk);
    // locate the marker: first position where the marker plus 5 zeros-free
    // check of following words matches
    found = -1;
    for (int p = 0; p + 10 * 3 < stream.size() && found < 0; p++) begin
      bit ok;
      ok = 1;
      for (int w = 0; w < 3 && ok; w++)
        for (int b = 0; b < 10; b++)
          if (stream[p + 10 * w + b] != sent[w][9 - b]) ok = 0;
      if (ok) found = p;
    end
    checks++;
    if (found < 0) begin
      failures++; $display("FAIL marker not found");
    end else begin
      // fixed latency: marker must leave 40..60 bit times after it was input
      checks++;
      if (found - 2 * mark_in_cyc < 10 || found - 2 * mark_in_cyc > 80) begin
        failures++; $display("FAIL latency %0d bits", found - 2 * mark_in_cyc);
      end
      pos = found;
      for (int w = 0; w < NW - 3; w++) begin
        logic [9:0] got;
        for (int b = 0; b < 10; b++) got[9 - b] = stream[pos + 10 * w + b];
        checks++;
        if (got !== sent[w]) begin failures++; if (failures < 10) $display("FAIL word %0d got %b exp %b", w, got, sent[w]); end
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
