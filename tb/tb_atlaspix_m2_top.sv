// tb_atlaspix_m2_top: end-to-end test of the full-size periphery
// (56 columns x 20 super pixels, default parameters, latency 43 BC).
// Discriminator pulses are applied to the pixel inputs; the serial output is
// decoded by tb_link_rx and the received hits are compared, as a multiset,
// with the hits expected from the trigger pattern:
//   A  hits in several columns, including the corners of the matrix, a
//      cluster across a group edge (4-line pattern) and a second hit in the
//      same super pixel; a 16-BC trigger covers their latency expiry
//      -> all are read out;
//   B  hits with no trigger at expiry -> deleted, never read out;
//   C  six hits in one super pixel within one BC -> four stored, two lost
//      (lost_hits = 2), the four read out.
// Each mechanism (trigger marking, deletion, overflow, ghost pattern,
// back-to-back frames, idle commas) is counted and must occur.
module tb_atlaspix_m2_top;
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

  // own bunch-crossing count, from the RCU's update tick
  int bc = 0;
  always @(posedge clk) if (rst_n && dut.tick) bc <= bc + 1;

  int expected[logic [31:0]];
  int n_expected = 0;

  task automatic wait_bc(input int n);
    int target;
    target = bc + n;
    while (bc < target) @(posedge clk);
  endtask

  function automatic logic [7:0] lines(input logic [15:0] p);
    logic [7:0] a;
    a = '0;
    for (int k = 0; k < 16; k++) if (p[k]) a |= (8'(1) << (4 + k / 4)) | (8'(1) << (k % 4));
    return a;
  endfunction

  // one discriminator pulse, 2 cycles long, recorded as expected or not
  task automatic pulse(input int c, input int s, input logic [15:0] p, input bit expect_it);
    @(posedge clk);
    pix[c][s] <= p;
    if (expect_it) begin
      logic [31:0] w;
      w = {3'b000, 6'(c), 5'(s), gray(10'(bc)), lines(p)};
      expected[w] = expected.exists(w) ? expected[w] + 1 : 1;
      n_expected++;
    end
    @(posedge clk);
    pix[c][s] <= '0;
    @(posedge clk);
  endtask

  task automatic trigger_window(input int start_bc);
    wait_bc(start_bc - bc);
    @(posedge clk); trigger <= 1;
    wait_bc(16);
    @(posedge clk); trigger <= 0;
  endtask

  initial begin
    int a, b, cc, ghosts, deleted_seen;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait_bc(5);
    checks++;
    if (dut.u_rcu.ts !== gray(10'(bc))) begin failures++; $display("FAIL time stamp %h at bc %0d", dut.u_rcu.ts, bc); end

    // ---- A: triggered hits ----
    a = bc;
    fork
      pulse(0, 0, 16'h0020, 1);
      pulse(55, 19, 16'h8000, 1);
      pulse(10, 3, 16'h0018, 1);      // cluster across the group edge
      pulse(10, 7, 16'h0001, 1);
      pulse(30, 12, 16'h0200, 1);
    join
    wait_bc(2);
    pulse(0, 0, 16'h0400, 1);         // second hit, same super pixel
    trigger_window(a + L - 4);

    // ---- B: untriggered hits ----
    wait_bc(10);
    b = bc;
    fork
      pulse(5, 5, 16'h0004, 0);
      pulse(40, 1, 16'h0100, 0);
    join
    wait_bc(L + 5);

    // ---- C: overflow of one hit buffer ----
    cc = bc;
    @(posedge clk);
    for (int i = 0; i < 6; i++) pulse(20, 2, 16'(1) << i, i < 4);
    trigger_window(cc + L - 4);
    wait_bc(20);

    // ---- results ----
    checks++; if (!rx.locked) begin failures++; $display("FAIL link never locked"); end
    checks++; if (rx.n_bad != 0 || rx.n_rd_err != 0 || rx.n_frame_err != 0) begin
      failures++; $display("FAIL link errors bad=%0d rd=%0d frame=%0d", rx.n_bad, rx.n_rd_err, rx.n_frame_err);
    end
    checks++; if (rx.frames.size() != n_expected) begin failures++; $display("FAIL %0d hits received, %0d expected", rx.frames.size(), n_expected); end
    ghosts = 0; deleted_seen = 0;
    foreach (rx.frames[i]) begin
      logic [31:0] w;
      w = rx.frames[i];
      checks++;
      if (expected.exists(w) && expected[w] > 0) expected[w]--;
      else begin
        failures++; $display("FAIL unexpected hit col %0d grp %0d ts %h pat %b", w[28:23], w[22:18], w[17:8], w[7:0]);
        if (w[28:23] == 6'd5 || w[28:23] == 6'd40) deleted_seen++;
      end
      if ($countones(w[7:0]) > 2) ghosts++;
    end
    // mechanism counts
    $display("mechanisms: marked=%0d deleted=%0d lost=%0d ghost=%0d idle=%0d",
             rx.frames.size(), 2 - deleted_seen, lost_hits, ghosts, rx.n_idle);
    checks++; if (rx.frames.size() == 0) begin failures++; $display("FAIL no triggered hit read"); end
    checks++; if (deleted_seen != 0) begin failures++; $display("FAIL untriggered hit read"); end
    checks++; if (lost_hits != 16'd2) begin failures++; $display("FAIL lost_hits %0d, expected 2", lost_hits); end
    checks++; if (ghosts != 1) begin failures++; $display("FAIL ghost pattern count %0d", ghosts); end
    checks++; if (rx.n_idle < 100) begin failures++; $display("FAIL too few idle commas"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
