// atlaspix_pkg: sizes and types shared by the ATLASpix1_M2 digital periphery.
//
// The matrix is 56 columns of 320 pixels (17920 pixels). Sixteen vertically
// adjacent pixels form a super pixel, so a column holds 20 super pixels, each
// with a 5-bit group address and an 8-line projection-addressed hit pattern.
// Time stamps are 10-bit gray codes advancing once per 25 ns bunch crossing.
// These numbers follow the chip description; the hit-word packing below
// (hit_t and its 4-byte transmission order) is this design's own choice.
package atlaspix_pkg;

  localparam int unsigned N_COL      = 56;   // pixel columns
  localparam int unsigned N_ROW      = 320;  // pixels per column
  localparam int unsigned SP_PIX     = 16;   // pixels per super pixel
  localparam int unsigned N_SP       = N_ROW / SP_PIX;  // super pixels per column (20)
  localparam int unsigned PAT_W      = 8;    // address lines per super pixel
  localparam int unsigned GRP_W      = 5;    // group (super pixel) address bits
  localparam int unsigned COL_W      = 6;    // column address bits
  localparam int unsigned TS_W       = 10;   // time stamp bits
  localparam int unsigned CAB_DEPTH  = 4;    // hits stored per super pixel

  // One hit as it leaves a column.
  typedef struct packed {
    logic [COL_W-1:0] col;
    logic [GRP_W-1:0] grp;
    logic [TS_W-1:0]  ts;    // gray-coded time stamp of the HitOR edge
    logic [PAT_W-1:0] pat;   // hit pattern on the 8 address lines
  } hit_t;

  // 8b/10b control characters used on the link.
  localparam logic [7:0] K28_5 = 8'hBC;  // idle / comma
  localparam logic [7:0] K28_1 = 8'h3C;  // start of a hit frame

  // Binary <-> gray conversion.
  function automatic logic [TS_W-1:0] bin2gray(input logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [TS_W-1:0] gray2bin(input logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
