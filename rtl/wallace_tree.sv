// wallace_tree: partial-product summation of the 8x8 Booth2 multiplier.
//
// Five rows are added, each bit a dual-rail signal at a fixed column (weight):
//   w[15:0]  partial product 0, columns 0..15 (sign-extended)
//   x[13:0]  partial product 1, columns 2..15
//   y[11:0]  partial product 2, columns 4..15
//   z[9:0]   partial product 3, columns 6..15
//   r0, r3, r5, r7  the +1 bits of negative partial products, at columns
//            0, 2, 4 and 6 (they are the multiplier bits MR1, MR3, MR5, MR7)
// Three carry-save levels of NCL full and half adders reduce the rows to two,
// then a ripple-carry adder makes the 16-bit product p (modulo 2^16):
//   level 1: FA(r3, x0, w2) at column 2, FA(y(k-4), x(k-2), wk) at columns 4..15
//   level 2: FA(x1, w3, carry of column 2) at column 3,
//            FA(level-1 sum k, level-1 carry k-1, z(k-6)) at columns 6..15
//   level 3: FA(level-1 sum 4, level-2 carry 3, r5) at column 4,
//            HA at column 5 (level-1 sum 5, level-1 carry 4),
//            HA at column 6 (level-2 sum 6, r7), HA at columns 7..15
//            (level-2 sum k, level-2 carry k-1)
//   final:   HA for p0 (w0, r0) and p1, HA for p2..p4, ripple FA for p5..p15.
// Carries out of column 15 are dropped (those adders' carry outputs are left
// open). Adder placement follows the published adder diagram; signal names
// follow its labels. Combinational NCL, no clock.
module wallace_tree
  import ncl_pkg::*;
(
  input  dr_t [15:0] w,
  input  dr_t [13:0] x,
  input  dr_t [11:0] y,
  input  dr_t [9:0]  z,
  input  dr_t        r0,
  input  dr_t        r3,
  input  dr_t        r5,
  input  dr_t        r7,
  output dr_t [15:0] p
);

  // sN_k / cN_k: sum at column k and carry out of column k (into k+1), level N
  dr_t [15:0] s1, c1, s2, c2, s3, c3, sf, cf;

  // ---- level 1
  ncl_fa u_l1_2 (.a(r3), .b(x[0]), .ci(w[2]), .s(s1[2]), .co(c1[2]));
  for (genvar k = 4; k < 16; k++) begin : g_l1
    ncl_fa u_fa (.a(y[k-4]), .b(x[k-2]), .ci(w[k]), .s(s1[k]), .co(c1[k]));
  end

  // ---- level 2
  ncl_fa u_l2_3 (.a(x[1]), .b(w[3]), .ci(c1[2]), .s(s2[3]), .co(c2[3]));
  for (genvar k = 6; k < 16; k++) begin : g_l2
    ncl_fa u_fa (.a(s1[k]), .b(c1[k-1]), .ci(z[k-6]), .s(s2[k]), .co(c2[k]));
  end

  // ---- level 3
  ncl_fa u_l3_4 (.a(s1[4]), .b(c2[3]), .ci(r5), .s(s3[4]), .co(c3[4]));
  ncl_ha u_l3_5 (.a(s1[5]), .b(c1[4]), .s(s3[5]), .c(c3[5]));
  ncl_ha u_l3_6 (.a(s2[6]), .b(r7), .s(s3[6]), .c(c3[6]));
  for (genvar k = 7; k < 16; k++) begin : g_l3
    ncl_ha u_ha (.a(s2[k]), .b(c2[k-1]), .s(s3[k]), .c(c3[k]));
  end

  // ---- final ripple-carry adder
  ncl_ha u_f0 (.a(w[0]), .b(r0), .s(sf[0]), .c(cf[0]));
  ncl_ha u_f1 (.a(w[1]), .b(cf[0]), .s(sf[1]), .c(cf[1]));
  ncl_ha u_f2 (.a(s1[2]), .b(cf[1]), .s(sf[2]), .c(cf[2]));
  ncl_ha u_f3 (.a(s2[3]), .b(cf[2]), .s(sf[3]), .c(cf[3]));
  ncl_ha u_f4 (.a(s3[4]), .b(cf[3]), .s(sf[4]), .c(cf[4]));
  for (genvar k = 5; k < 16; k++) begin : g_rca
    ncl_fa u_fa (.a(s3[k]), .b(c3[k-1]), .ci(cf[k-1]), .s(sf[k]), .co(cf[k]));
  end

  assign p = sf;

endmodule
