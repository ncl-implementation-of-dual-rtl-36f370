// booth_pp_gen: Booth2 partial-product generation for the 8x8 multiplier.
//
// The multiplier MR is cut into four overlapping 3-bit groups
// {MR[2j+1], MR[2j], MR[2j-1]} (MR[-1] = 0). For each group j a booth_decoder
// makes the selects m1 (+-MD) and m2 (+-2MD); one booth_block1 makes bit 0 of
// partial product j and eight booth_block2 make bits 1..8. The partial
// product is 9 bits wide so that +-2MD fits; MD is sign-extended by one bit
// (MD[8] = MD[7]) for bit 8. A negative partial product comes out as the one's
// complement of |PP|; its missing +1 is the group's sign bit MR[2j+1], output
// as neg[j] and added in the summation at the partial product's LSB column.
//
// Interface: md, mr dual-rail operands (two's complement); pp[j][i] bit i of
// partial product j (weight 4^j); neg[j] = mr[2j+1], a plain wire from the
// multiplier input. Combinational NCL: all
// outputs become DATA once all inputs are DATA and NULL once all are NULL.
module booth_pp_gen
  import ncl_pkg::*;
(
  input  dr_t [MD_W-1:0]             md,
  input  dr_t [MR_W-1:0]             mr,
  output dr_t [NUM_PP-1:0][PP_W-1:0] pp,
  output dr_t [NUM_PP-1:0]           neg
);

  dr_t [MD_W:0] md_x;  // MD sign-extended to 9 bits
  assign md_x = {md[MD_W-1], md};

  for (genvar j = 0; j < NUM_PP; j++) begin : g_pp
    dr_t m1, m2;
    dr_t [2:0] grp;

    assign neg[j] = mr[2*j+1];
    if (j == 0) begin : g_grp0
      assign grp = {mr[1], mr[0], DR_NULL};  // mr[-1] is not a signal; unused
      booth_decoder #(.FIRST_GROUP(1'b1)) u_dec (.mr(grp), .m1(m1), .m2(m2));
    end else begin : g_grp
      assign grp = {mr[2*j+1], mr[2*j], mr[2*j-1]};
      booth_decoder #(.FIRST_GROUP(1'b0)) u_dec (.mr(grp), .m1(m1), .m2(m2));
    end

    booth_block1 u_b1 (.m1(m1), .md0(md_x[0]), .s(mr[2*j+1]), .pp(pp[j][0]));

    for (genvar i = 1; i < PP_W; i++) begin : g_b2
      booth_block2 u_b2 (
        .m1(m1), .m2(m2), .md_i(md_x[i]), .md_im1(md_x[i-1]), .s(mr[2*j+1]), .pp(pp[j][i])
      );
    end
  end

endmodule
