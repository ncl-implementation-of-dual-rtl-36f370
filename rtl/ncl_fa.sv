// ncl_fa: dual-rail NCL full adder, {co, s} = a + b + ci.
//
// The usual NCL full adder of four gates:
//   co.r1 = TH23(a.r1, b.r1, ci.r1)    co.r0 = TH23(a.r0, b.r0, ci.r0)
//   s.r1  = TH34w2(co.r0, a.r1, b.r1, ci.r1)
//   s.r0  = TH34w2(co.r1, a.r0, b.r0, ci.r0)
// co is the majority of the inputs. The sum's rail 1 fires when the carry is
// 0 and at least one input is 1 (exactly one 1), or when all three are 1; rail
// 0 is the mirror image. The carry gates are needed by the sum, so a full
// adder whose carry goes nowhere (most significant column) keeps them and
// leaves co unconnected. This gate structure is a standard one chosen here,
// not taken from the source. No clock.
module ncl_fa
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t ci,
  output dr_t s,
  output dr_t co
);

  ncl_th #(.N(3), .M(2)) u_c1 (.rst(1'b0), .a({ci.r1, b.r1, a.r1}), .z(co.r1));
  ncl_th #(.N(3), .M(2)) u_c0 (.rst(1'b0), .a({ci.r0, b.r0, a.r0}), .z(co.r0));
  ncl_th #(.N(4), .M(3), .W1(2)) u_s1 (.rst(1'b0), .a({ci.r1, b.r1, a.r1, co.r0}), .z(s.r1));
  ncl_th #(.N(4), .M(3), .W1(2)) u_s0 (.rst(1'b0), .a({ci.r0, b.r0, a.r0, co.r1}), .z(s.r0));

endmodule
