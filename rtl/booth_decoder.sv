// booth_decoder: Booth2 recoder for one 3-bit group of the multiplier MR.
//
// Group j is {MR[2j+1], MR[2j], MR[2j-1]}, given here as mr[2:0]. The decoder
// produces two dual-rail selects: m1 (the partial product is +-MD) and m2
// (the partial product is +-2MD), following the Booth2 selection table:
//   000 -> 0, 001/010 -> +MD, 011 -> +2MD, 100 -> -2MD, 101/110 -> -MD, 111 -> -0.
// So m1 = MR[2j] xor MR[2j-1] and m2 = 1 for 011 and 100. The sign of the
// partial product is MR[2j+1] itself and is taken straight from the
// multiplier, not from this block. For the first group (FIRST_GROUP = 1) the
// missing MR[-1] is the constant 0, so the block uses only mr[2:1] and leaves
// mr[0] unused (a constant cannot be a dual-rail wire that returns to NULL).
//
// Inside: the minterm gates of the group's two or three inputs shared by both
// outputs (see ncl_sop); the gate structure is this design's own. Both outputs
// wait for the whole group. No clock.
module booth_decoder
  import ncl_pkg::*;
#(
  parameter bit FIRST_GROUP = 1'b0
) (
  input  dr_t [2:0] mr,
  output dr_t       m1,
  output dr_t       m2
);

  dr_t [1:0] y;
  assign m1 = y[0];
  assign m2 = y[1];

  if (FIRST_GROUP) begin : g_first
    // index {MR[1], MR[0]} with MR[-1] = 0: m1 = MR[0], m2 = MR[1] & ~MR[0]
    ncl_sop #(.N(2), .K(2), .TRUTH({4'b0100, 4'b1010})) u_sop (.x(mr[2:1]), .y(y));
  end else begin : g_mid
    // index {MR[2j+1], MR[2j], MR[2j-1]}
    ncl_sop #(.N(3), .K(2), .TRUTH({8'b0001_1000, 8'b0110_0110})) u_sop (.x(mr), .y(y));
  end

endmodule
