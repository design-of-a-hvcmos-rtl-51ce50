// sp_addr_encoder: projection addressing of one 16-pixel super pixel.
//
// The 16 discriminator outputs of a super pixel are not routed individually
// to the periphery. The pixels are split into four groups of four; a hit pixel
// k drives group line G[k/4] and position line P[k%4]. The 8 lines
// {G[3:0], P[3:0]} are wired ORs, so a single hit pixel raises exactly two
// lines, and the periphery forms HitOR from them. Clusters spanning two
// groups produce ghost combinations, which the off-chip reconstruction
// tolerates. Purely combinational; the 16-to-8 reduction is from the chip
// description, the group/position assignment of the lines is this design's
// reading of it.
//
// Ports: pix[15:0] discriminator outputs, addr[7:0] = {G[3:0], P[3:0]}.
module sp_addr_encoder (
  input  logic [15:0] pix,
  output logic [7:0]  addr
);
  logic [3:0] grp_line, pos_line;

  for (genvar g = 0; g < 4; g++) begin : g_grp
    // group line g: any of pixels 4g .. 4g+3
    assign grp_line[g] = |pix[4*g +: 4];
  end

  for (genvar p = 0; p < 4; p++) begin : g_pos
    // position line p: pixel p of any group
    assign pos_line[p] = pix[p] | pix[4+p] | pix[8+p] | pix[12+p];
  end

  assign addr = {grp_line, pos_line};
endmodule
