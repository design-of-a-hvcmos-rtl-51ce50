// serializer: 10-to-2 bit MUX-tree serializer of the RCU.
//
// The encoded 10-bit words arrive at the word rate (160 MHz strobe). An input
// register resynchronises each word, then three stages halve the width while
// doubling the rate, so that the bit rate is the same at every stage
// (10 x 160 = 8 x 200 = 4 x 400 = 2 x 800 Mbit/s at an 800 MHz input clock):
//   stage 1  10 -> 8 bits at 200 MHz: a gearbox that keeps a short bit queue
//            and hands out its eight oldest bits on each 200 MHz strobe;
//   stage 2   8 -> 4 bits at 400 MHz: a 2:1 multiplexer over a held byte;
//   stage 3   4 -> 2 bits at 800 MHz: a 2:1 multiplexer over a held nibble.
// The 2-bit output goes to the full-custom double-data-rate output stage,
// which sends dout[1] first. Bit 9 of a word is the first bit on the line.
// The strobes must come from clk_gen, whose strobes all coincide once every
// 20 cycles; the gearbox relies on that phase relation and never underflows
// in steady state. Latency from `word` to the first of its bits on dout is
// fixed (a few word periods).
// The three-stage tree, the input synchronisation and the 2-bit output are
// from the chip description; the stage widths 10/8/4/2 are this design's
// reading of the clock frequencies it lists.
module serializer (
  input  logic       clk,      // 800 MHz
  input  logic       rst_n,
  input  logic       ce_160,
  input  logic       ce_200,
  input  logic       ce_400,
  input  logic [9:0] word,
  output logic [1:0] dout
);
  logic [9:0]  in_q;
  logic [19:0] gb;        // bit queue, bit 0 is the oldest
  logic [4:0]  gb_n;
  logic [7:0]  byte_q;
  logic [7:0]  hold8;
  logic [3:0]  nib_q;
  logic [3:0]  hold4;

  logic [19:0] gb_nxt;
  logic [4:0]  gb_n_nxt;
  logic [7:0]  gb_out;
  logic        gb_pop;

  function automatic logic [9:0] rev10(input logic [9:0] v);
    for (int i = 0; i < 10; i++) rev10[i] = v[9-i];
  endfunction

  // gearbox next state: pop the eight oldest bits, then append the new word
  always_comb begin
    logic [19:0] q;
    logic [4:0]  n;
    q      = gb;
    n      = gb_n;
    gb_pop = ce_200 && (n >= 5'd8);
    for (int i = 0; i < 8; i++) gb_out[7-i] = q[i];
    if (gb_pop) begin
      q = q >> 8;
      n = n - 5'd8;
    end
    if (ce_160) begin
      q = q | (20'(rev10(in_q)) << n);
      n = n + 5'd10;
    end
    gb_nxt   = q;
    gb_n_nxt = n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q   <= '0;
      gb     <= '0;
      gb_n   <= '0;
      byte_q <= '0;
      hold8  <= '0;
      nib_q  <= '0;
      hold4  <= '0;
      dout   <= '0;
    end else begin
      // input synchronisation
      if (ce_160) in_q <= word;

      // stage 1: 10 -> 8 gearbox
      if (gb_pop) byte_q <= gb_out;
      gb   <= gb_nxt;
      gb_n <= gb_n_nxt;

      // stage 2: 8 -> 4
      if (ce_200) begin
        hold8 <= byte_q;
        nib_q <= hold8[3:0];
      end else if (ce_400) begin
        nib_q <= hold8[7:4];
      end

      // stage 3: 4 -> 2
      if (ce_400) begin
        hold4 <= nib_q;
        dout  <= hold4[1:0];
      end else begin
        dout  <= hold4[3:2];
      end
    end
  end
endmodule
