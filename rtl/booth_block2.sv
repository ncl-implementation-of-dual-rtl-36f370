// booth_block2: one Booth2 partial-product bit above the LSB.
//
// pp_i = ((m1 & md_i) | (m2 & md_im1)) xor s: the bit of MD (select m1) or of
// 2MD, i.e. MD shifted left by one (select m2), inverted when the group's sign
// bit s = MR[2j+1] is 1 (one's complement; the +1 is added elsewhere).
//
// Inside, two levels of minterm logic (ncl_sop), this design's own structure:
// twelve TH44 gates over {m1, m2, md_i, md_im1} make the unsigned selection t
// (the four combinations with m1 = m2 = 1 cannot occur and get no gate), then
// four TH22 gates over {s, t} make the XOR. Dual-rail in and out, no clock.
module booth_block2
  import ncl_pkg::*;
(
  input  dr_t m1,
  input  dr_t m2,
  input  dr_t md_i,
  input  dr_t md_im1,
  input  dr_t s,
  output dr_t pp
);

  dr_t t;

  // index {m1, m2, md_i, md_im1}: t = 1 for 0101, 0111, 1010, 1011
  ncl_sop #(.N(4), .K(1), .TRUTH(16'b0000_1100_1010_0000), .CARE(16'h0FFF))
    u_sel (.x({m1, m2, md_i, md_im1}), .y(t));

  // index {s, t}: xor
  ncl_sop #(.N(2), .K(1), .TRUTH(4'b0110)) u_neg (.x({s, t}), .y(pp));

endmodule
