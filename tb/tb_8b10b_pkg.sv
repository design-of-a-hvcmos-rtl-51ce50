// tb_8b10b_pkg: reference 8b/10b code for the testbenches.
//
// Written independently of the RTL encoder: both disparity columns of the
// 5b/6b and 3b/4b tables are spelled out, and decoding searches the
// reference encoder. Also holds a reference gray code.
package tb_8b10b_pkg;

  // 5b/6b: {RD- code, RD+ code}, abcdei
  function automatic logic [11:0] ref6(input int x);
    case (x)
      0: return {6'b100111, 6'b011000};  1: return {6'b011101, 6'b100010};
      2: return {6'b101101, 6'b010010};  3: return {6'b110001, 6'b110001};
      4: return {6'b110101, 6'b001010};  5: return {6'b101001, 6'b101001};
      6: return {6'b011001, 6'b011001};  7: return {6'b111000, 6'b000111};
      8: return {6'b111001, 6'b000110};  9: return {6'b100101, 6'b100101};
      10: return {6'b010101, 6'b010101}; 11: return {6'b110100, 6'b110100};
      12: return {6'b001101, 6'b001101}; 13: return {6'b101100, 6'b101100};
      14: return {6'b011100, 6'b011100}; 15: return {6'b010111, 6'b101000};
      16: return {6'b011011, 6'b100100}; 17: return {6'b100011, 6'b100011};
      18: return {6'b010011, 6'b010011}; 19: return {6'b110010, 6'b110010};
      20: return {6'b001011, 6'b001011}; 21: return {6'b101010, 6'b101010};
      22: return {6'b011010, 6'b011010}; 23: return {6'b111010, 6'b000101};
      24: return {6'b110011, 6'b001100}; 25: return {6'b100110, 6'b100110};
      26: return {6'b010110, 6'b010110}; 27: return {6'b110110, 6'b001001};
      28: return {6'b001110, 6'b001110}; 29: return {6'b101110, 6'b010001};
      30: return {6'b011110, 6'b100001}; default: return {6'b101011, 6'b010100};
    endcase
  endfunction

  // 3b/4b: {RD- code, RD+ code}, fghj; 8 = A7
  function automatic logic [7:0] ref4(input int y);
    case (y)
      0: return {4'b1011, 4'b0100}; 1: return {4'b1001, 4'b1001};
      2: return {4'b0101, 4'b0101}; 3: return {4'b1100, 4'b0011};
      4: return {4'b1101, 4'b0010}; 5: return {4'b1010, 4'b1010};
      6: return {4'b0110, 4'b0110}; 7: return {4'b1110, 4'b0001};
      default: return {4'b0111, 4'b1000};
    endcase
  endfunction

  // Encode one character; rd is updated (1 = positive).
  function automatic logic [9:0] ref_enc(input logic [7:0] d, input logic k, inout logic rd);
    logic [11:0] c6; logic [7:0] c4; logic [5:0] six; logic [3:0] four;
    int x, y, ones;
    logic rd1;
    x = int'(d[4:0]); y = int'(d[7:5]);
    if (k) begin
      // K28.y spelled out for RD-
      logic [3:0] kf;
      case (y)
        0: kf = 4'b0100; 1: kf = 4'b1001; 2: kf = 4'b0101; 3: kf = 4'b0011;
        4: kf = 4'b0010; 5: kf = 4'b1010; 6: kf = 4'b0110; default: kf = 4'b1000;
      endcase
      ref_enc = rd ? ~{6'b001111, kf} : {6'b001111, kf};
    end else begin
      c6 = ref6(x);
      six = rd ? c6[5:0] : c6[11:6];
      ones = $countones(six);
      rd1 = (ones > 3) ? 1'b1 : (ones < 3) ? 1'b0 : rd;
      if (y == 7 && ((!rd1 && (x == 17 || x == 18 || x == 20)) ||
                     ( rd1 && (x == 11 || x == 13 || x == 14))))
        c4 = ref4(8);
      else
        c4 = ref4(y);
      four = rd1 ? c4[3:0] : c4[7:4];
      ref_enc = {six, four};
    end
    ones = $countones(ref_enc);
    if (ones > 5) rd = 1'b1;
    else if (ones < 5) rd = 1'b0;
  endfunction

  // Decode by search; returns 1 if the symbol is a valid code word.
  function automatic bit ref_dec(input logic [9:0] s, output logic [7:0] d, output logic k);
    for (int kk = 0; kk < 2; kk++)
      for (int v = 0; v < 256; v++)
        for (int r = 0; r < 2; r++) begin
          logic rdt;
          rdt = r[0];
          if (kk == 1 && v[4:0] != 5'd28) continue;
          if (ref_enc(8'(v), kk[0], rdt) == s) begin
            d = 8'(v); k = kk[0];
            return 1'b1;
          end
        end
    d = '0; k = 1'b0;
    return 1'b0;
  endfunction

  function automatic logic [9:0] gray(input logic [9:0] b);
    logic [9:0] g;
    for (int i = 0; i < 9; i++) g[i] = b[i] != b[i+1];
    g[9] = b[9];
    return g;
  endfunction

endpackage
