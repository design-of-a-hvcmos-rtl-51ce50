// tb_sp_addr_encoder: checks the projection addressing of a super pixel.
// Every single-pixel hit must raise exactly its group and position lines;
// random multi-pixel patterns are compared with an OR over groups and
// positions computed here.
module tb_sp_addr_encoder;
  logic [15:0] pix;
  logic [7:0]  addr;
  int checks = 0, failures = 0;

  sp_addr_encoder dut (.pix, .addr);

  function automatic logic [7:0] expect_lines(input logic [15:0] p);
    logic [3:0] g, q;
    for (int gi = 0; gi < 4; gi++) g[gi] = |p[4*gi +: 4];
    for (int qi = 0; qi < 4; qi++) q[qi] = p[qi] | p[4+qi] | p[8+qi] | p[12+qi];
    return {g, q};
  endfunction

  initial begin
    pix = '0;
    #1;
    checks++; if (addr !== 8'h00) begin failures++; $display("FAIL no hit -> %h", addr); end
    for (int k = 0; k < 16; k++) begin
      pix = 16'(1) << k;
      #1;
      checks++;
      if (addr !== (8'(1) << (4 + k / 4) | 8'(1) << (k % 4)) || $countones(addr) != 2) begin
        failures++; $display("FAIL pixel %0d -> %b", k, addr);
      end
    end
    // cluster across a group edge (pixels 3 and 4) reads back as 0,3,4,7
    pix = 16'h0018; #1;
    checks++; if (addr !== 8'b0011_1001) begin failures++; $display("FAIL edge cluster %b", addr); end
    for (int i = 0; i < 500; i++) begin
      pix = 16'($urandom);
      #1;
      checks++;
      if (addr !== expect_lines(pix)) begin failures++; $display("FAIL %h -> %b", pix, addr); end
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
