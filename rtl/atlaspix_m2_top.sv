// atlaspix_m2_top: digital periphery of the ATLASpix1_M2 HVCMOS sensor.
//
// The 56 x 320 pixel matrix is read out with a triggered scheme. Every
// 16-pixel super pixel reports on 8 projection-addressed lines (Parallel
// Pixel to Buffer transfer) to its own content addressable hit buffer, which
// keeps up to four hits with their time stamps for the on-chip latency and
// keeps only those confirmed by the level-1 trigger. The readout control unit
// moves confirmed hits to the End of Column buffers, reads them, encodes them
// 8b/10b and serializes them onto one double-data-rate line.
//
// Ports:
//   clk       800 MHz clock (from the on-chip PLL on the chip)
//   latency   on-chip latency in bunch crossings (>= 1)
//   trigger   level-1 trigger, synchronous to clk
//   pix       discriminator outputs, pix[col][super pixel][pixel]; pixel k
//             of super pixel s in a column is row 16*s + k
//   ser_out   serial output line (two bits per clock period)
//   ser_d     the same data before the output stage, dout[1] first
//   lost_hits count of hits dropped because a hit buffer was full
//   clk_*     divided clocks of the RCU
// The pixels' analog front end, the tune DACs, the PLL and the bias block are
// outside this RTL.
module atlaspix_m2_top
  import atlaspix_pkg::*;
#(
  parameter int unsigned NCOL  = N_COL,
  parameter int unsigned NSP   = N_SP,
  parameter int unsigned DEPTH = CAB_DEPTH
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [TS_W-1:0]                       latency,
  input  logic                                  trigger,
  input  logic [NCOL-1:0][NSP-1:0][SP_PIX-1:0]  pix,
  output logic                                  ser_out,
  output logic [1:0]                            ser_d,
  output logic [15:0]                           lost_hits,
  output logic                                  clk_400,
  output logic                                  clk_200,
  output logic                                  clk_160
);
  logic [TS_W-1:0]             ts, ts_del;
  logic                        tick, ld_col;
  logic [NCOL-1:0]             rd_col, eoc_full, col_lost;
  logic [NCOL-1:0][GRP_W-1:0]  eoc_grp;
  logic [NCOL-1:0][TS_W-1:0]   eoc_ts;
  logic [NCOL-1:0][PAT_W-1:0]  eoc_pat;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    hit_column #(.NSP(NSP), .DEPTH(DEPTH)) u_col (
      .clk, .rst_n,
      .pix(pix[c]),
      .ts, .ts_del, .tick, .trigger,
      .ld_col,
      .rd_col  (rd_col[c]),
      .eoc_full(eoc_full[c]),
      .eoc_grp (eoc_grp[c]),
      .eoc_ts  (eoc_ts[c]),
      .eoc_pat (eoc_pat[c]),
      .lost    (col_lost[c])
    );
  end

  rcu #(.NCOL(NCOL)) u_rcu (
    .clk, .rst_n, .latency,
    .ts, .ts_del, .tick,
    .eoc_full, .eoc_grp, .eoc_ts, .eoc_pat,
    .ld_col, .rd_col,
    .ser_d,
    .clk_400, .clk_200, .clk_160
  );

  cml_ser u_cml (.clk, .rst_n, .d(ser_d), .q(ser_out));

  // lost-hit counter (saturating)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lost_hits <= '0;
    else if (lost_hits != 16'hFFFF) lost_hits <= lost_hits + 16'($countones(col_lost));
  end
endmodule
