// tb_cab: checks the content addressable hit buffer of one super pixel.
// A local time base supplies ts/ts_del (latency L). Checked: a hit with the
// trigger high when its latency expires is marked and read back with its
// pattern, time stamp and group address exactly L bunch crossings later; a
// hit without trigger is deleted; four hits fill the buffer and a fifth is
// lost; a held HitOR level records only one hit; unload frees entries.
module tb_cab;
  import tb_8b10b_pkg::gray;
  localparam int L = 6;
  logic clk = 0, rst_n = 0;
  logic [7:0] addr_lines = '0;
  logic [9:0] ts, ts_del;
  logic tick = 0, trigger = 0, unload = 0;
  logic has_marked, lost, full;
  logic [4:0] rd_grp;
  logic [9:0] rd_ts;
  logic [7:0] rd_pat;
  int checks = 0, failures = 0;
  int bc = 0;

  cab #(.DEPTH(4), .GROUP_ADDR(5'd19)) dut (.*);

  always #5 clk = ~clk;

  assign ts     = gray(10'(bc));
  assign ts_del = gray(10'(bc - L));

  task automatic next_bc();
    @(posedge clk); bc <= bc + 1; tick <= 1;
    @(posedge clk); tick <= 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic hit(input logic [7:0] p);
    @(posedge clk); addr_lines <= p;
    @(posedge clk); addr_lines <= '0;
    @(posedge clk);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (bc %0d)", msg, bc); end
  endtask

  initial begin
    int t0;
    int lost_seen;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) next_bc();

    // 1. triggered hit
    t0 = bc;
    hit(8'b0010_0100);
    check(!has_marked, "marked too early");
    for (int i = 0; i < L - 1; i++) begin
      next_bc();
      check(!has_marked, "marked before latency");
    end
    trigger <= 1;
    next_bc();
    trigger <= 0;
    check(bc - t0 == L, "latency count");
    check(has_marked, "triggered hit not marked");
    check(rd_pat == 8'b0010_0100, "pattern");
    check(rd_ts == gray(10'(t0)), "time stamp");
    check(rd_grp == 5'd19, "group address");
    @(posedge clk); unload <= 1;
    @(posedge clk); unload <= 0;
    @(posedge clk);
    check(!has_marked, "unload did not free");

    // 2. untriggered hit is deleted
    hit(8'b1000_0001);
    repeat (L) next_bc();
    check(!has_marked, "untriggered hit marked");
    check(!full, "buffer full after deletion");

    // 3. overflow: four hits in one BC fill, the fifth is lost
    lost_seen = 0;
    fork
      begin
        for (int i = 0; i < 5; i++) hit(8'(8'h11 << (i % 4)));
      end
      begin
        repeat (20) begin @(posedge clk); #1; if (lost) lost_seen++; end
      end
    join
    check(full, "not full after four hits");
    check(lost_seen == 1, "fifth hit not reported lost");
    // a HitOR level held high records only once
    repeat (L - 1) next_bc();
    trigger <= 1;
    next_bc();
    trigger <= 0;
    begin
      int n;
      n = 0;
      while (has_marked && n < 10) begin
        check(rd_ts == gray(10'(bc - L)), "overflow hit time stamp");
        @(posedge clk); unload <= 1;
        @(posedge clk); unload <= 0;
        @(posedge clk);
        n++;
      end
      check(n == 4, "four hits read back");
    end
    addr_lines <= 8'h21;
    repeat (10) @(posedge clk);
    addr_lines <= 8'h00;
    @(posedge clk);
    repeat (L - 1) next_bc();
    trigger <= 1;
    next_bc();
    trigger <= 0;
    check(has_marked, "held hit not stored");
    @(posedge clk); unload <= 1;
    @(posedge clk); unload <= 0;
    @(posedge clk);
    check(!has_marked, "held HitOR stored more than once");

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
