// ncl_ha: dual-rail NCL half adder, s = a xor b, c = a and b.
//
// The common four-gate NCL half adder:
//   s.r1 = THxor0(a.r0, b.r1, a.r1, b.r0)   = a0 b1 + a1 b0
//   s.r0 = THxor0(a.r0, b.r0, a.r1, b.r1)   = a0 b0 + a1 b1
//   c.r1 = TH22(a.r1, b.r1)
//   c.r0 = TH12(a.r0, b.r0)
// The sum waits for both inputs; the carry's rail 0 may appear as soon as one
// input is DATA0 (the sum makes the block as a whole input-complete). The gate
// structure is a standard one chosen here, not taken from the source. Where
// the carry is not used (the most significant column of the product) it is
// left unconnected. No clock.
module ncl_ha
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t s,
  output dr_t c
);

  ncl_th_x #(.FUNC(TH_XOR0)) u_s1 (.a({b.r0, a.r1, b.r1, a.r0}), .z(s.r1));
  ncl_th_x #(.FUNC(TH_XOR0)) u_s0 (.a({b.r1, a.r1, b.r0, a.r0}), .z(s.r0));
  ncl_th #(.N(2), .M(2)) u_c1 (.rst(1'b0), .a({b.r1, a.r1}), .z(c.r1));
  ncl_th #(.N(2), .M(1)) u_c0 (.rst(1'b0), .a({b.r0, a.r0}), .z(c.r0));

endmodule
