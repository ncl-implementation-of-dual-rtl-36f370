// ncl_th_x: the three four-input NCL gates that are not weighted threshold
// gates: THxor0 (Z = AB + CD), THand0 (Z = AB + BC + AD) and TH24comp
// (Z = AC + BC + AD + BD), chosen by FUNC.
//
// Like every NCL gate it has hysteresis: the output is asserted when the set
// function is true and released only when all four inputs are deasserted, so
// Z = set + Z_prev * (A + B + C + D). Inputs a[0..3] are A, B, C, D. The state
// is a level-sensitive latch, as in ncl_th. No clock, no reset. The
// multiplier does not use these gates; they complete the library of
// fundamental gates of four or fewer variables.
module ncl_th_x
  import ncl_pkg::*;
#(
  parameter ncl_special_e FUNC = TH_XOR0
) (
  input  logic [3:0] a,
  output logic       z
);

  logic A, B, C, D, set_f, load;

  assign {D, C, B, A} = a;

  always_comb
    case (FUNC)
      TH_XOR0:   set_f = (A & B) | (C & D);
      TH_AND0:   set_f = (A & B) | (B & C) | (A & D);
      default:   set_f = (A & C) | (B & C) | (A & D) | (B & D);
    endcase

  assign load = set_f || !(|a);

  always_latch
    if (load) z = set_f;

endmodule
