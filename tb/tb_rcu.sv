// tb_rcu: checks the readout control unit end to end on the serial side.
// Four columns are modelled as End of Column registers fed from queues.
// The serial 2-bit output is decoded by tb_link_rx; every queued hit must
// arrive as one frame with the right column, group, time stamp and pattern,
// in load rounds, with valid 8b/10b code and running disparity. Also checks
// the time stamps (gray, delayed by the latency, one update per 20 cycles)
// and that frames follow one another at one character per 5 cycles.
module tb_rcu;
  import tb_8b10b_pkg::gray;
  localparam int NCOL = 4;
  logic clk = 0, rst_n = 0;
  logic [9:0] latency = 10'd43;
  logic [9:0] ts, ts_del;
  logic tick, ld_col, clk_400, clk_200, clk_160;
  logic [NCOL-1:0] eoc_full = '0, rd_col;
  logic [NCOL-1:0][4:0] eoc_grp = '0;
  logic [NCOL-1:0][9:0] eoc_ts = '0;
  logic [NCOL-1:0][7:0] eoc_pat = '0;
  logic [1:0] ser_d;
  int checks = 0, failures = 0;

  rcu #(.NCOL(NCOL)) dut (.*);
  tb_link_rx rx (.clk, .rst_n, .d(ser_d));
  always #5 clk = ~clk;

  logic [22:0] q[NCOL][$];
  logic [31:0] expected[$];
  bit go = 0;
  int cyc = 0, last_tick = -1, nticks = 0;

  always @(posedge clk) begin
    cyc++;
    for (int c = 0; c < NCOL; c++) begin
      if (rd_col[c]) eoc_full[c] <= 1'b0;
      if (ld_col && go && (!eoc_full[c] || rd_col[c]) && q[c].size() > 0) begin
        logic [22:0] h;
        h = q[c].pop_front();
        eoc_full[c] <= 1'b1;
        {eoc_grp[c], eoc_ts[c], eoc_pat[c]} <= h;
      end
    end
  end

  // time stamp checks
  always @(posedge clk) begin
    #1;
    if (rst_n && tick) begin
      nticks++;
      checks++;
      if (ts !== gray(10'(nticks)) || ts_del !== gray(10'(nticks) - latency)) begin
        failures++; $display("FAIL time stamps at tick %0d", nticks);
      end
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != 20) begin failures++; $display("FAIL tick spacing"); end
      end
      last_tick = cyc;
    end
  end

  initial begin
    int t_first, t_last;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NCOL; c++)
      for (int j = 0; j < 3 - c % 2; j++)
        q[c].push_back({5'($urandom), 10'($urandom), 8'($urandom)});
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < NCOL; c++)
        if (q[c].size() > r) expected.push_back({3'b000, 6'(c), q[c][r]});
    repeat (200) @(posedge clk);
    go = 1;
    t_first = cyc;
    wait (rx.frames.size() == expected.size() || cyc > 5000);
    t_last = cyc;
    repeat (200) @(posedge clk);
    checks++; if (!rx.locked) begin failures++; $display("FAIL receiver never locked"); end
    checks++; if (rx.n_bad != 0) begin failures++; $display("FAIL %0d invalid symbols", rx.n_bad); end
    checks++; if (rx.n_rd_err != 0) begin failures++; $display("FAIL %0d disparity errors", rx.n_rd_err); end
    checks++; if (rx.n_frame_err != 0) begin failures++; $display("FAIL %0d framing errors", rx.n_frame_err); end
    checks++; if (rx.frames.size() != expected.size()) begin failures++; $display("FAIL %0d frames exp %0d", rx.frames.size(), expected.size()); end
    for (int i = 0; i < expected.size() && i < rx.frames.size(); i++) begin
      checks++;
      if (rx.frames[i] !== expected[i]) begin failures++; $display("FAIL frame %0d %h exp %h", i, rx.frames[i], expected[i]); end
    end
    // 11 hits x 5 characters x 5 cycles, plus pipeline latency < 80 cycles
    checks++;
    if (t_last - t_first > expected.size() * 25 + 80) begin failures++; $display("FAIL readout took %0d cycles", t_last - t_first); end
    checks++; if (rx.n_idle < 20) begin failures++; $display("FAIL too few idle commas"); end
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
