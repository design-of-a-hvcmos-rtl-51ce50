// tb_readout_ctrl: checks load/read column scheduling and hit framing.
// Eight columns are modelled here: each holds a queue of hits and an End of
// Column register filled on ld_col (when empty) and emptied on rd_col. The
// characters handed to the encoder on each word strobe are parsed: hits must
// come as K28.1 + 4 bytes {3'b0, col, grp, ts, pat}, in load rounds, lowest
// column first within a round, with no idle character between frames while
// hits wait, and K28.5 idles before and after.
module tb_readout_ctrl;
  localparam int NCOL = 8;
  logic clk = 0, rst_n = 0, ce_word;
  logic [NCOL-1:0] eoc_full = '0;
  logic [NCOL-1:0][4:0] eoc_grp = '0;
  logic [NCOL-1:0][9:0] eoc_ts = '0;
  logic [NCOL-1:0][7:0] eoc_pat = '0;
  logic ld_col;
  logic [NCOL-1:0] rd_col;
  logic [7:0] enc_data;
  logic enc_k;
  int checks = 0, failures = 0;

  readout_ctrl #(.NCOL(NCOL)) dut (.*);
  always #5 clk = ~clk;

  int ph = 0;
  always @(posedge clk) ph <= (ph + 1) % 5;
  assign ce_word = (ph == 0);

  logic [22:0] q[NCOL][$];     // {grp, ts, pat}
  logic [31:0] expected[$];
  bit go = 0;
  int nload = 0;

  // EoC model
  always @(posedge clk) begin
    for (int c = 0; c < NCOL; c++) begin
      if (rd_col[c]) eoc_full[c] <= 1'b0;
      if (ld_col && go && (!eoc_full[c] || rd_col[c]) && q[c].size() > 0) begin
        logic [22:0] h;
        h = q[c].pop_front();
        eoc_full[c] <= 1'b1;
        {eoc_grp[c], eoc_ts[c], eoc_pat[c]} <= h;
      end
    end
    if (ld_col) nload++;
    if (rd_col != '0) begin
      checks++;
      if (!eoc_full[$clog2(int'(rd_col))]) begin failures++; $display("FAIL read of empty column"); end
    end
  end

  // character capture
  logic [8:0] chars[$];
  always @(posedge clk) if (rst_n && ce_word) chars.push_back({enc_k, enc_data});

  initial begin
    int maxr, n, i, frames, idle_gaps;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NCOL; c++) begin
      n = (c * 3) % 4;   // 0..3 hits per column
      for (int j = 0; j < n; j++) q[c].push_back({5'($urandom), 10'($urandom), 8'($urandom)});
    end
    // expected order: rounds of loads, lowest column first
    maxr = 4;
    for (int r = 0; r < maxr; r++)
      for (int c = 0; c < NCOL; c++)
        if (q[c].size() > r) expected.push_back({3'b000, 6'(c), q[c][r]});
    repeat (50) @(posedge clk);
    go = 1;
    repeat (2000) @(posedge clk);
    // parse
    i = 0; frames = 0; idle_gaps = 0;
    checks++;
    if (chars[0] !== {1'b1, 8'hBC}) begin failures++; $display("FAIL no idle at start"); end
    while (i < chars.size()) begin
      if (chars[i] == {1'b1, 8'h3C} && i + 4 < chars.size()) begin
        logic [31:0] w;
        w = {chars[i+1][7:0], chars[i+2][7:0], chars[i+3][7:0], chars[i+4][7:0]};
        checks++;
        if (chars[i+1][8] || chars[i+2][8] || chars[i+3][8] || chars[i+4][8]) begin failures++; $display("FAIL K in frame"); end
        checks++;
        if (frames >= expected.size() || w !== expected[frames]) begin
          failures++; $display("FAIL frame %0d got %h exp %h", frames, w, frames < expected.size() ? expected[frames] : 0);
        end
        frames++;
        i += 5;
        if (frames < expected.size() && i < chars.size() && chars[i] != {1'b1, 8'h3C}) idle_gaps++;
      end else begin
        checks++;
        if (chars[i] !== {1'b1, 8'hBC}) begin failures++; $display("FAIL unexpected char %h", chars[i]); end
        i++;
      end
    end
    checks++; if (frames != expected.size()) begin failures++; $display("FAIL %0d frames, exp %0d", frames, expected.size()); end
    checks++; if (idle_gaps != 0) begin failures++; $display("FAIL %0d idle gaps between waiting hits", idle_gaps); end
    checks++; if (nload < 5) begin failures++; $display("FAIL too few load column cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
