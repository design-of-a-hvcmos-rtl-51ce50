// enc8b10b: two-stage pipelined 8b/10b encoder with running disparity.
//
// Standard Widmer-Franaszek code: the low five bits (EDCBA) map to a 6-bit
// sub-block abcdei, the high three bits (HGF) to a 4-bit sub-block fghj.
// Stage 1 looks both sub-blocks up in their tables (negative-disparity form)
// together with the facts stage 2 needs: whether the sub-block has a
// complementary form, whether it is unbalanced, and which x values force the
// alternate D.x.A7 code. Stage 2 holds the running disparity (RD) and picks
// the complemented forms where RD is positive, updating RD after each
// unbalanced sub-block. Control characters K28.y are supported (k = 1 with
// data = {y, 5'd28}); their RD+ form is the complement of the RD- form.
//
// Interface: data/k are taken on each `en` strobe (one per 10-bit word);
// `sym` is updated at the next strobe after that (two-strobe pipeline) and holds the symbol with bit 9 = a, the
// first bit on the line. RD starts negative after reset.
// The pipelined encoder with running disparity is from the chip description;
// the split into these two stages is this design's choice.
module enc8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] data,
  input  logic       k,
  output logic [9:0] sym,
  output logic       rd      // running disparity after sym (1 = positive)
);
  // 5b/6b table, negative-disparity column, written abcdei (a = MSB).
  function automatic logic [5:0] tab6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b table, negative-disparity column, written fghj; y = 7 gives P7.
  function automatic logic [3:0] tab4(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // ---- stage 1: table look-up ----
  logic [5:0] s1_c6;
  logic [2:0] s1_y;
  logic       s1_alt6, s1_unb6, s1_a7n, s1_a7p, s1_k;
  logic [5:0] c6;

  assign c6 = k ? 6'b001111 : tab6(data[4:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_c6 <= 6'b110001; s1_y <= 3'd3; s1_alt6 <= 1'b0; s1_unb6 <= 1'b0;  // D3.3, neutral
      s1_a7n <= 1'b0; s1_a7p <= 1'b0; s1_k <= 1'b0;
    end else if (en) begin
      s1_c6   <= c6;
      s1_y    <= data[7:5];
      s1_unb6 <= ($countones(c6) != 3);
      // D.7 is balanced but still has a complementary form
      s1_alt6 <= ($countones(c6) != 3) || (!k && data[4:0] == 5'd7);
      s1_a7n  <= (data[4:0] == 5'd17) || (data[4:0] == 5'd18) || (data[4:0] == 5'd20);
      s1_a7p  <= (data[4:0] == 5'd11) || (data[4:0] == 5'd13) || (data[4:0] == 5'd14);
      s1_k    <= k;
    end
  end

  // ---- stage 2: disparity control ----
  logic [5:0] six;
  logic [3:0] base4, four;
  logic       rd1, alt4, a7;
  logic [9:0] sym_nxt;
  logic       rd_nxt;

  always_comb begin
    if (s1_k) begin
      // build the RD- form (RD after 001111 is positive), complement if RD+
      rd1   = 1'b1;
      six   = s1_c6;
      a7    = (s1_y == 3'd7);
    end else begin
      six   = (s1_alt6 && rd) ? ~s1_c6 : s1_c6;
      rd1   = rd ^ s1_unb6;
      a7    = (s1_y == 3'd7) && ((!rd1 && s1_a7n) || (rd1 && s1_a7p));
    end
    base4 = a7 ? 4'b0111 : tab4(s1_y);
    alt4  = (s1_y == 3'd0) || (s1_y == 3'd3) || (s1_y == 3'd4) || (s1_y == 3'd7);
    four  = (alt4 && rd1) ? ~base4 : base4;
    sym_nxt = {six, four};
    if (s1_k && rd) sym_nxt = ~sym_nxt;
    rd_nxt = rd ^ ($countones(sym_nxt) != 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym <= 10'b1001110100;  // D0.0, RD-
      rd  <= 1'b0;
    end else if (en) begin
      sym <= sym_nxt;
      rd  <= rd_nxt;
    end
  end
endmodule
