// ncl_booth_mult: combinational dual-rail NCL 8x8 two's-complement multiplier.
//
// Booth2 partial-product generation (booth_pp_gen) feeds the carry-save
// Wallace tree and ripple-carry adder (wallace_tree). Partial product j is
// sign-extended from its 9 bits to the 16 - 2j columns it covers, and the
// +1 of each negative partial product (bit MR[2j+1]) enters at column 2j.
//
// Interface: md (multiplicand) and mr (multiplier) as 8 dual-rail bits each,
// p the 16-bit dual-rail product md * mr. As NCL logic it has no clock: p
// becomes all DATA some time after md and mr are all DATA, and all NULL after
// they are all NULL. Registers and completion are added by ncl_booth_mult_top.
module ncl_booth_mult
  import ncl_pkg::*;
(
  input  dr_t [MD_W-1:0]   md,
  input  dr_t [MR_W-1:0]   mr,
  output dr_t [PROD_W-1:0] p
);

  dr_t [NUM_PP-1:0][PP_W-1:0] pp;
  dr_t [NUM_PP-1:0]           neg;
  dr_t [15:0] w;
  dr_t [13:0] x;
  dr_t [11:0] y;
  dr_t [9:0]  z;

  booth_pp_gen u_ppgen (.md(md), .mr(mr), .pp(pp), .neg(neg));

  // sign extension: bits above bit 8 repeat bit 8
  for (genvar k = 0; k < 16; k++) begin : g_w
    assign w[k] = pp[0][(k < PP_W) ? k : PP_W-1];
  end
  for (genvar k = 0; k < 14; k++) begin : g_x
    assign x[k] = pp[1][(k < PP_W) ? k : PP_W-1];
  end
  for (genvar k = 0; k < 12; k++) begin : g_y
    assign y[k] = pp[2][(k < PP_W) ? k : PP_W-1];
  end
  for (genvar k = 0; k < 10; k++) begin : g_z
    assign z[k] = pp[3][(k < PP_W) ? k : PP_W-1];
  end

  wallace_tree u_tree (
    .w(w), .x(x), .y(y), .z(z),
    .r0(neg[0]), .r3(neg[1]), .r5(neg[2]), .r7(neg[3]),
    .p(p)
  );

endmodule
