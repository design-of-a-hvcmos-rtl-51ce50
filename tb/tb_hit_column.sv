// tb_hit_column: checks one column with its End of Column buffer.
// Hits are injected into several super pixels in the same bunch crossing
// with the trigger high at expiry; repeated load/read column cycles must
// deliver them lowest super pixel first, one per load, with the group address
// equal to the super pixel index and the pattern of the projection encoding.
// A load while the EoC buffer is full must not take a hit; a hit whose
// latency expires without trigger never appears.
module tb_hit_column;
  import tb_8b10b_pkg::gray;
  localparam int NSP = 20;
  localparam int L   = 5;
  logic clk = 0, rst_n = 0;
  logic [NSP-1:0][15:0] pix = '0;
  logic [9:0] ts, ts_del;
  logic tick = 0, trigger = 0, ld_col = 0, rd_col = 0;
  logic eoc_full, lost;
  logic [4:0] eoc_grp;
  logic [9:0] eoc_ts;
  logic [7:0] eoc_pat;
  int checks = 0, failures = 0;
  int bc = 0;

  hit_column #(.NSP(NSP)) dut (.*);

  always #5 clk = ~clk;
  assign ts     = gray(10'(bc));
  assign ts_del = gray(10'(bc - L));

  task automatic next_bc();
    @(posedge clk); bc <= bc + 1; tick <= 1;
    @(posedge clk); tick <= 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [7:0] lines(input int k);
    return (8'(1) << (4 + k / 4)) | (8'(1) << (k % 4));
  endfunction

  int sps[4] = '{17, 2, 9, 0};
  int pxs[4] = '{5, 15, 0, 10};

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) next_bc();
    t0 = bc;
    @(posedge clk);
    for (int i = 0; i < 4; i++) pix[sps[i]][pxs[i]] <= 1'b1;
    @(posedge clk);
    pix <= '0;
    next_bc();
    // an untriggered hit one BC later in super pixel 3
    @(posedge clk); pix[3][7] <= 1'b1;
    @(posedge clk); pix <= '0;
    repeat (L - 2) next_bc();
    trigger <= 1;
    next_bc();
    trigger <= 0;
    next_bc();   // expiry of the untriggered hit
    check(!eoc_full, "EoC full before load");
    // expected order: super pixels 0, 2, 9, 17
    begin
      int exp_sp[4] = '{0, 2, 9, 17};
      int exp_px[4] = '{10, 15, 0, 5};
      for (int i = 0; i < 4; i++) begin
        @(posedge clk); ld_col <= 1;
        @(posedge clk); ld_col <= 0;
        #1;
        check(eoc_full, "EoC not loaded");
        check(eoc_grp == 5'(exp_sp[i]), $sformatf("group %0d exp %0d", eoc_grp, exp_sp[i]));
        check(eoc_pat == lines(exp_px[i]), "pattern");
        check(eoc_ts == gray(10'(t0)), "time stamp");
        if (i == 1) begin
          // load while full: nothing moves
          @(posedge clk); ld_col <= 1;
          @(posedge clk); ld_col <= 0;
          #1;
          check(eoc_grp == 5'(exp_sp[i]), "load while full replaced the EoC hit");
        end
        @(posedge clk); rd_col <= 1;
        @(posedge clk); rd_col <= 0;
        #1;
        check(!eoc_full, "EoC not emptied by read");
      end
      // nothing left, in particular not the untriggered hit
      @(posedge clk); ld_col <= 1;
      @(posedge clk); ld_col <= 0;
      #1;
      check(!eoc_full, "untriggered or extra hit delivered");
    end
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
