// booth_block1: least significant bit of one Booth2 partial product.
//
// pp0 = (m1 & md0) xor s, where m1 is the decoder's +-MD select, md0 the
// multiplicand's LSB and s the group's sign bit MR[2j+1]. The 2MD term has no
// LSB (2MD ends in 0), so m2 is not needed here. A negative partial product is
// formed as the one's complement here; the +1 that completes the two's
// complement is added as a separate bit in the summation tree.
//
// Inside: eight TH33 minterm gates and two TH14 gates (ncl_sop), this
// design's own structure. Dual-rail in and out, no clock.
module booth_block1
  import ncl_pkg::*;
(
  input  dr_t m1,
  input  dr_t md0,
  input  dr_t s,
  output dr_t pp
);

  // index {s, m1, md0}: 1 for 011, 100, 101, 110
  ncl_sop #(.N(3), .K(1), .TRUTH(8'b0111_1000)) u_sop (.x({s, m1, md0}), .y(pp));

endmodule
