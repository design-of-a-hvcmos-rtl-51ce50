// rcu: Readout Control Unit of ATLASpix1_M2.
//
// Generates everything the column periphery needs and turns its hits into
// the serial stream:
//   clk_gen       400/200/160 MHz clocks and strobes from the 800 MHz clock,
//                 plus the 40 MHz bunch-crossing strobe;
//   ts_gen        gray-coded time stamp and delayed time stamp (delay =
//                 on-chip latency, programmable through `latency`);
//   readout_ctrl  load column / read column scheduling and hit framing;
//   enc8b10b      pipelined 8b/10b encoder, one character per 160 MHz cycle;
//   serializer    10 -> 2 bit MUX tree; `ser_d` feeds the DDR output stage.
// The chip's RCU also carries a 6-bit second time stamp that ATLASpix1_M2
// does not use; it is left out here. Everything runs on the 800 MHz clock
// with the clk_gen strobes as enables; the divided clocks are brought out.
module rcu
  import atlaspix_pkg::*;
#(
  parameter int unsigned NCOL = N_COL
) (
  input  logic                        clk,       // 800 MHz
  input  logic                        rst_n,
  input  logic [TS_W-1:0]             latency,
  output logic [TS_W-1:0]             ts,
  output logic [TS_W-1:0]             ts_del,
  output logic                        tick,
  input  logic [NCOL-1:0]             eoc_full,
  input  logic [NCOL-1:0][GRP_W-1:0]  eoc_grp,
  input  logic [NCOL-1:0][TS_W-1:0]   eoc_ts,
  input  logic [NCOL-1:0][PAT_W-1:0]  eoc_pat,
  output logic                        ld_col,
  output logic [NCOL-1:0]             rd_col,
  output logic [1:0]                  ser_d,
  output logic                        clk_400,
  output logic                        clk_200,
  output logic                        clk_160
);
  logic       ce_400, ce_200, ce_160, ce_bc;
  logic [7:0] enc_data;
  logic       enc_k;
  logic [9:0] sym;
  logic       rd_unused;

  clk_gen u_clk (
    .clk, .rst_n,
    .clk_400, .clk_200, .clk_160,
    .ce_400, .ce_200, .ce_160, .ce_bc
  );

  ts_gen u_ts (
    .clk, .rst_n, .ce_bc, .latency,
    .ts, .ts_del, .tick
  );

  readout_ctrl #(.NCOL(NCOL)) u_ctrl (
    .clk, .rst_n,
    .ce_word(ce_160),
    .eoc_full, .eoc_grp, .eoc_ts, .eoc_pat,
    .ld_col, .rd_col,
    .enc_data, .enc_k
  );

  enc8b10b u_enc (
    .clk, .rst_n, .en(ce_160),
    .data(enc_data), .k(enc_k),
    .sym, .rd(rd_unused)
  );

  serializer u_ser (
    .clk, .rst_n, .ce_160, .ce_200, .ce_400,
    .word(sym), .dout(ser_d)
  );
endmodule
