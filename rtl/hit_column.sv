// hit_column: one pixel column of the periphery with its End of Column buffer.
//
// A column holds N_SP super pixels. Each has a projection address encoder
// (16 pixels -> 8 lines) and a content addressable hit buffer (cab) whose
// group address is its position in the column. The End of Column (EoC)
// buffer is one hit register. On `ld_col` (load column), if the EoC buffer is
// empty, the hit of the lowest-numbered super pixel that has a marked entry
// is copied into it and that entry is freed in its buffer. On `rd_col` (read
// column) the readout controller takes the EoC content and the buffer empties;
// a load in the same cycle refills it. `lost` pulses when any super pixel
// dropped a hit because its buffer was full.
//
// Load/read column and the EoC buffer are named by the chip description; the
// single-entry EoC buffer and the fixed priority among super pixels are this
// design's choices.
module hit_column
  import atlaspix_pkg::*;
#(
  parameter int unsigned NSP   = N_SP,
  parameter int unsigned DEPTH = CAB_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NSP-1:0][SP_PIX-1:0] pix,   // discriminator outputs
  input  logic [TS_W-1:0]           ts,
  input  logic [TS_W-1:0]           ts_del,
  input  logic                      tick,
  input  logic                      trigger,
  input  logic                      ld_col,
  input  logic                      rd_col,
  output logic                      eoc_full,
  output logic [GRP_W-1:0]          eoc_grp,
  output logic [TS_W-1:0]           eoc_ts,
  output logic [PAT_W-1:0]          eoc_pat,
  output logic                      lost
);
  logic [NSP-1:0]             sp_marked, sp_unload, sp_lost;
  logic [NSP-1:0][GRP_W-1:0]  sp_grp;
  logic [NSP-1:0][TS_W-1:0]   sp_ts;
  logic [NSP-1:0][PAT_W-1:0]  sp_pat;
  logic [NSP-1:0][PAT_W-1:0]  sp_addr;
  logic [NSP-1:0]             sp_full_unused;

  for (genvar s = 0; s < NSP; s++) begin : g_sp
    sp_addr_encoder u_enc (.pix(pix[s]), .addr(sp_addr[s]));
    cab #(.DEPTH(DEPTH), .GROUP_ADDR(GRP_W'(s))) u_cab (
      .clk, .rst_n,
      .addr_lines(sp_addr[s]),
      .ts, .ts_del, .tick, .trigger,
      .unload    (sp_unload[s]),
      .has_marked(sp_marked[s]),
      .rd_grp    (sp_grp[s]),
      .rd_ts     (sp_ts[s]),
      .rd_pat    (sp_pat[s]),
      .lost      (sp_lost[s]),
      .full      (sp_full_unused[s])
    );
  end

  int  sel;
  logic load_now;

  always_comb begin
    sel = -1;
    for (int s = NSP - 1; s >= 0; s--) if (sp_marked[s]) sel = s;
  end

  assign load_now = ld_col && (!eoc_full || rd_col) && (sel >= 0);

  always_comb begin
    sp_unload = '0;
    if (load_now) sp_unload[sel] = 1'b1;
  end

  assign lost = |sp_lost;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eoc_full <= 1'b0;
      eoc_grp  <= '0;
      eoc_ts   <= '0;
      eoc_pat  <= '0;
    end else begin
      if (rd_col) eoc_full <= 1'b0;
      if (load_now) begin
        eoc_full <= 1'b1;
        eoc_grp  <= sp_grp[sel];
        eoc_ts   <= sp_ts[sel];
        eoc_pat  <= sp_pat[sel];
      end
    end
  end
endmodule
