// tb_link_rx: receiver for the serial link, used by testbenches.
// Collects the 2-bit serializer output (d[1] first) into a bit stream, locks
// on the first K28.5 comma, decodes every following 10-bit symbol with a
// table built from the reference encoder, checks the running disparity, and
// parses frames: K28.1 followed by four data bytes. Results are left in
// `frames` and the counters for the testbench to read.
module tb_link_rx (
  input logic       clk,
  input logic       rst_n,
  input logic [1:0] d
);
  import tb_8b10b_pkg::*;

  logic [31:0] frames[$];
  int n_idle = 0, n_bad = 0, n_rd_err = 0, n_sym = 0, n_frame_err = 0;
  bit locked = 0;

  logic [8:0] dec_tab[int];   // symbol -> {k, data}
  initial begin
    for (int kk = 0; kk < 2; kk++)
      for (int v = 0; v < 256; v++)
        for (int r = 0; r < 2; r++) begin
          logic rdt; logic [9:0] s;
          if (kk == 1 && v[4:0] != 5'd28) continue;
          rdt = r[0];
          s = ref_enc(8'(v), kk[0], rdt);
          dec_tab[int'(s)] = {kk[0], 8'(v)};
        end
  end

  logic [9:0] sh = '0;
  int   nb = 0;
  logic rd = 0;
  int   fpos = 0;       // 0: between frames, 1..4: data bytes expected
  logic [31:0] fw;

  task automatic take_bit(input bit b);
    sh = {sh[8:0], b};
    if (!locked) begin
      if (sh == 10'b0011111010 || sh == 10'b1100000101) begin
        locked = 1;
        rd = (sh == 10'b0011111010);   // RD after this comma
        nb = 0;
        n_idle++;
      end
      return;
    end
    nb++;
    if (nb < 10) return;
    nb = 0;
    n_sym++;
    if (!dec_tab.exists(int'(sh))) begin
      n_bad++;
      return;
    end
    begin
      logic [8:0] c; logic rdt;
      c = dec_tab[int'(sh)];
      rdt = rd;
      if (ref_enc(c[7:0], c[8], rdt) != sh) n_rd_err++;
      // update rd from the symbol itself
      if ($countones(sh) > 5) rd = 1'b1;
      else if ($countones(sh) < 5) rd = 1'b0;
      if (c[8]) begin
        if (fpos != 0) n_frame_err++;
        if (c[7:0] == 8'hBC) n_idle++;
        else if (c[7:0] == 8'h3C) fpos = 1;
        else n_frame_err++;
      end else begin
        if (fpos == 0) n_frame_err++;
        else begin
          fw = {fw[23:0], c[7:0]};
          if (fpos == 4) begin frames.push_back(fw); fpos = 0; end
          else fpos++;
        end
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      take_bit(d[1]);
      take_bit(d[0]);
    end
  end
endmodule
