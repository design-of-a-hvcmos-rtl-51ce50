// readout_ctrl: readout scheduler of the RCU (load column / read column).
//
// The controller alternates between two operations on the column periphery:
//   load column  `ld_col` for one cycle: every column whose End of Column
//                buffer is empty moves one triggered hit into it;
//   read column  the lowest-numbered column with a full EoC buffer is read
//                (`rd_col` one-hot for one cycle) and its hit is framed for
//                the encoder.
// A hit leaves as five 8b/10b characters, one per word strobe (ce_word):
//   K28.1, then the 32-bit word {3'b000, col[5:0], grp[4:0], ts[9:0],
//   pat[7:0]} most significant byte first.
// When no hit is being sent the idle comma K28.5 is sent. While a frame is
// on its way the controller already reads the next EoC buffer, so frames
// follow each other without idle characters as long as hits are waiting.
// `enc_data`/`enc_k` change right after a ce_word edge and are taken by the
// encoder on the next one.
// Load/read column scheduling and 8b/10b framing are from the chip
// description; the frame format and the column priority are this design's.
module readout_ctrl
  import atlaspix_pkg::*;
#(
  parameter int unsigned NCOL = N_COL
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ce_word,
  input  logic [NCOL-1:0]             eoc_full,
  input  logic [NCOL-1:0][GRP_W-1:0]  eoc_grp,
  input  logic [NCOL-1:0][TS_W-1:0]   eoc_ts,
  input  logic [NCOL-1:0][PAT_W-1:0]  eoc_pat,
  output logic                        ld_col,
  output logic [NCOL-1:0]             rd_col,
  output logic [7:0]                  enc_data,
  output logic                        enc_k
);
  typedef enum logic [1:0] {S_LOAD, S_SCAN, S_WAIT} state_t;

  state_t      state;
  logic [31:0] frame;       // next hit to send
  logic        frame_vld;
  logic [31:0] tx;          // hit being sent
  logic [2:0]  tx_idx;      // 0 = nothing in flight, 1..5 = character number
  int          sel;

  always_comb begin
    sel = -1;
    for (int c = NCOL - 1; c >= 0; c--) if (eoc_full[c]) sel = c;
  end

  hit_t sel_hit;

  always_comb begin
    sel_hit = '0;
    if (sel >= 0) begin
      sel_hit.col = COL_W'(sel);
      sel_hit.grp = eoc_grp[sel];
      sel_hit.ts  = eoc_ts[sel];
      sel_hit.pat = eoc_pat[sel];
    end
  end

  always_comb begin
    ld_col = (state == S_LOAD);
    rd_col = '0;
    if (state == S_SCAN && sel >= 0) rd_col[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      frame     <= '0;
      frame_vld <= 1'b0;
      tx        <= '0;
      tx_idx    <= '0;
      enc_data  <= K28_5;
      enc_k     <= 1'b1;
    end else begin
      // ---- fetch the next hit into `frame` ----
      case (state)
        S_LOAD: state <= S_SCAN;
        S_SCAN: begin
          if (sel >= 0) begin
            frame     <= {3'b000, sel_hit};
            frame_vld <= 1'b1;
            state     <= S_WAIT;
          end else begin
            state <= S_LOAD;
          end
        end
        default: ;  // S_WAIT: leaves when the frame is taken below
      endcase

      // ---- character output ----
      if (ce_word) begin
        if (tx_idx == 3'd0 || tx_idx == 3'd5) begin
          if (frame_vld && state == S_WAIT) begin
            tx        <= frame;
            frame_vld <= 1'b0;
            state     <= S_SCAN;
            tx_idx    <= 3'd1;
            enc_data  <= K28_1;
            enc_k     <= 1'b1;
          end else begin
            tx_idx    <= 3'd0;
            enc_data  <= K28_5;
            enc_k     <= 1'b1;
          end
        end else begin
          enc_data <= tx[8*(4-tx_idx) +: 8];
          enc_k    <= 1'b0;
          tx_idx   <= tx_idx + 3'd1;
        end
      end
    end
  end

  a_rd_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd_col))
    else $error("readout_ctrl: more than one column read");
endmodule
