// tb_threshold_scan: the threshold-scan operating point on the full matrix.
// Settings as in the chip's threshold scan: latency 43 BC, a 16-BC wide
// trigger placed a fixed delay after each injection, so that every hit of an
// injection is triggered. Three injections:
//   1. every one of the 17920 pixels fires -> one hit per super pixel
//      (1120 hits), all 8 lines set;
//   2. one pixel per super pixel, pixel index (col + sp) mod 16 -> 1120 hits
//      with a two-line pattern;
//   3. no pixel fires above threshold -> nothing.
// Every hit must be received exactly once over the serial link with the
// injection's time stamp; no hit may be lost. Reports the readout time of a
// full-matrix injection.
module tb_threshold_scan;
  import atlaspix_pkg::*;
  import tb_8b10b_pkg::gray;

  localparam int L = 43;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [TS_W-1:0] latency = 10'(L);
  logic [N_COL-1:0][N_SP-1:0][SP_PIX-1:0] pix = '0;
  logic ser_out;
  logic [1:0] ser_d;
  logic [15:0] lost_hits;
  logic clk_400, clk_200, clk_160;
  int checks = 0, failures = 0;

  atlaspix_m2_top dut (.*);
  tb_link_rx rx (.clk, .rst_n, .d(ser_d));
  always #5 clk = ~clk;

  int bc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.tick) bc <= bc + 1;
  end

  int expected[logic [31:0]];
  int n_expected = 0;

  task automatic wait_bc(input int n);
    int target;
    target = bc + n;
    while (bc < target) @(posedge clk);
  endtask

  function automatic logic [7:0] lines(input int k);
    return (8'(1) << (4 + k / 4)) | (8'(1) << (k % 4));
  endfunction

  task automatic inject(input int mode);
    int t;
    logic [N_COL-1:0][N_SP-1:0][SP_PIX-1:0] v;
    v = '0;
    @(posedge clk);
    t = bc;
    for (int c = 0; c < N_COL; c++)
      for (int s = 0; s < N_SP; s++) begin
        logic [31:0] w;
        if (mode == 1) begin
          v[c][s] = 16'hFFFF;
          w = {3'b000, 6'(c), 5'(s), gray(10'(t)), 8'hFF};
        end else begin
          v[c][s] = 16'(1) << ((c + s) % 16);
          w = {3'b000, 6'(c), 5'(s), gray(10'(t)), lines((c + s) % 16)};
        end
        if (mode != 3) begin
          expected[w] = 1;
          n_expected++;
        end
      end
    if (mode == 3) v = '0;
    pix <= v;
    repeat (4) @(posedge clk);
    pix <= '0;
    // trigger window: fixed delay after injection, 16 BC wide
    wait_bc(L - 8);
    @(posedge clk); trigger <= 1;
    wait_bc(16);
    @(posedge clk); trigger <= 0;
  endtask

  initial begin
    int t0, t_full;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait_bc(3);
    t0 = cyc;
    inject(1);
    wait (rx.frames.size() == n_expected || bc > 5000);
    t_full = cyc - t0;
    inject(2);
    wait (rx.frames.size() == n_expected || bc > 10000);
    inject(3);
    wait_bc(20);

    checks++; if (rx.n_bad != 0 || rx.n_rd_err != 0 || rx.n_frame_err != 0) begin
      failures++; $display("FAIL link errors bad=%0d rd=%0d frame=%0d", rx.n_bad, rx.n_rd_err, rx.n_frame_err);
    end
    checks++; if (rx.frames.size() != n_expected) begin failures++; $display("FAIL %0d hits received, %0d expected", rx.frames.size(), n_expected); end
    foreach (rx.frames[i]) begin
      checks++;
      if (expected.exists(rx.frames[i]) && expected[rx.frames[i]] > 0) expected[rx.frames[i]]--;
      else begin failures++; if (failures < 10) $display("FAIL unexpected or repeated hit %h", rx.frames[i]); end
    end
    checks++; if (lost_hits != 0) begin failures++; $display("FAIL %0d hits lost", lost_hits); end
    $display("full-matrix injection read out in %0d cycles (%0d BC)", t_full, t_full / 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
