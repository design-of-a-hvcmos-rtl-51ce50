// ts_gen: time stamp and delayed time stamp generator of the RCU.
//
// A binary counter advances once per bunch crossing (ce_bc). Two gray-coded
// 10-bit values are derived from it: ts, the current time stamp distributed to
// the hit buffers, and ts_del = gray(count - latency), the same sequence
// lagging by the programmable on-chip latency. A hit buffer entry whose stored
// time stamp equals ts_del has therefore been held for exactly `latency`
// bunch crossings. Both values are registered and change together; tick is
// high for the one 800 MHz cycle in which new values first appear.
// Gray coding and the 10-bit width follow the chip description; deriving the
// delayed stamp by subtraction is this design's choice.
module ts_gen
  import atlaspix_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce_bc,
  input  logic [TS_W-1:0] latency,   // on-chip latency in bunch crossings
  output logic [TS_W-1:0] ts,        // gray code
  output logic [TS_W-1:0] ts_del,    // gray code, delayed by latency
  output logic            tick
);
  logic [TS_W-1:0] cnt;
  logic [TS_W-1:0] cnt_nxt;

  assign cnt_nxt = cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      ts     <= '0;
      ts_del <= '0;
      tick   <= 1'b0;
    end else begin
      tick <= ce_bc;
      if (ce_bc) begin
        cnt    <= cnt_nxt;
        ts     <= bin2gray(cnt_nxt);
        ts_del <= bin2gray(cnt_nxt - latency);
      end
    end
  end
endmodule
