// cab: Content Addressable hit Buffer of one super pixel.
//
// The 8 projection-addressed lines of a super pixel enter here. Their OR is
// the HitOR signal; on its rising edge the 8-bit hit pattern and the current
// gray-coded time stamp are written into a free one of DEPTH entries (four
// on the chip). If no entry is free the hit is lost and `lost` pulses.
//
// The buffer is content addressed by time: at every bunch crossing (tick)
// each waiting entry compares its stored time stamp with the delayed time
// stamp ts_del. On a match the on-chip latency has elapsed: if the level-1
// trigger is high at that moment the entry is marked for readout, otherwise
// it is deleted. Marked entries wait for the column logic, which reads the
// lowest-numbered one through rd_* and frees it with `unload`.
// The 5-bit group address comes from the parameter GROUP_ADDR, standing in
// for the address ROM of the super pixel.
//
// Depth, widths, HitOR, the TS compare and the mark/delete rule follow the
// chip description. Sampling the address lines with the 800 MHz clock, the
// entry allocation order and "trigger high at the moment of the match" as
// the trigger condition are this design's choices. A latency of at least one
// bunch crossing is assumed.
module cab
  import atlaspix_pkg::*;
#(
  parameter int unsigned     DEPTH      = CAB_DEPTH,
  parameter logic [GRP_W-1:0] GROUP_ADDR = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PAT_W-1:0] addr_lines,  // from the super pixel
  input  logic [TS_W-1:0]  ts,
  input  logic [TS_W-1:0]  ts_del,
  input  logic             tick,        // new ts / ts_del this cycle
  input  logic             trigger,     // level-1 trigger
  input  logic             unload,      // free the entry shown on rd_*
  output logic             has_marked,
  output logic [GRP_W-1:0] rd_grp,
  output logic [TS_W-1:0]  rd_ts,
  output logic [PAT_W-1:0] rd_pat,
  output logic             lost,        // hit arrived with the buffer full
  output logic             full
);
  typedef enum logic [1:0] {E_FREE, E_WAIT, E_MARKED} est_t;

  est_t             st  [DEPTH];
  logic [TS_W-1:0]  e_ts [DEPTH];
  logic [PAT_W-1:0] e_pat[DEPTH];

  logic hitor, hitor_q, hit_rise;
  int   wr_idx, rd_idx;

  assign hitor    = |addr_lines;
  assign hit_rise = hitor & ~hitor_q;

  always_comb begin
    wr_idx = -1;
    rd_idx = -1;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (st[i] == E_FREE)   wr_idx = i;
      if (st[i] == E_MARKED) rd_idx = i;
    end
  end

  assign full       = (wr_idx < 0);
  assign has_marked = (rd_idx >= 0);
  assign rd_grp     = GROUP_ADDR;
  assign rd_ts      = has_marked ? e_ts[rd_idx]  : '0;
  assign rd_pat     = has_marked ? e_pat[rd_idx] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hitor_q <= 1'b0;
      lost    <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        st[i]    <= E_FREE;
        e_ts[i]  <= '0;
        e_pat[i] <= '0;
      end
    end else begin
      hitor_q <= hitor;
      lost    <= hit_rise && full;
      // latency expiry: mark on trigger, delete otherwise
      if (tick) begin
        for (int i = 0; i < DEPTH; i++) begin
          if (st[i] == E_WAIT && e_ts[i] == ts_del)
            st[i] <= trigger ? E_MARKED : E_FREE;
        end
      end
      if (unload && has_marked) st[rd_idx] <= E_FREE;
      if (hit_rise && !full) begin
        st[wr_idx]    <= E_WAIT;
        e_ts[wr_idx]  <= ts;
        e_pat[wr_idx] <= addr_lines;
      end
    end
  end

  a_unload_valid: assert property (@(posedge clk) disable iff (!rst_n) unload |-> has_marked)
    else $error("cab: unload without a marked entry");
endmodule
