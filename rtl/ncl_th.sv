// ncl_th: one NCL threshold gate, THmn or weighted THmnWw1w2w3.
//
// The gate has N inputs (a[0] is input 1). Its output is asserted once the
// weighted count of asserted inputs reaches the threshold M (the "set"
// function) and, because of hysteresis, stays asserted until every input is
// deasserted again (the "hold" function is the OR of all inputs):
//   Z = set + Z_prev * hold.
// Inputs 1..3 may carry the integer weights W1..W3 (TH34w2 is N=4, M=3,
// W1=2). THnn is an N-input C-element, TH1n an N-input OR gate; a TH1n gate
// holds no state and is built as a plain OR. Gates with RESET set to RST_N
// ('n') or RST_D ('d') are forced to 0 or 1 while rst is high; the registers
// use them.
//
// Timing: no clock. The stateful gate is a level-sensitive latch that loads 1
// when set is true and 0 when no input is asserted; otherwise it keeps its
// value. That latch is the gate's intended hysteresis, not an inference
// accident. A simulator reports combinational loops through this module:
// one is the real register/completion handshake loop of the asynchronous
// system, the others are only apparent, where a ripple chain reads and writes
// bits of one packed vector. All settle, because every gate output changes at
// most once per DATA or NULL wavefront. Static and semi-static transistor versions of a gate differ only
// in speed, area and power, so this one model stands for both.
module ncl_th
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned M     = 1,
  parameter int unsigned W1    = 1,
  parameter int unsigned W2    = 1,
  parameter int unsigned W3    = 1,
  parameter ncl_reset_e  RESET = RST_NONE
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);

  function automatic int unsigned weight(input int unsigned i);
    case (i)
      0:       return W1;
      1:       return W2;
      2:       return W3;
      default: return 1;
    endcase
  endfunction

  function automatic int unsigned total_weight();
    int unsigned acc = 0;
    for (int unsigned i = 0; i < N; i++) acc += weight(i);
    return acc;
  endfunction

  initial begin
    assert (N >= 1 && N <= 4) else $error("ncl_th: N=%0d outside 1..4", N);
    assert (M >= 1 && M <= total_weight())
      else $error("ncl_th: threshold %0d unreachable", M);
  end

  logic set_f, hold_f;
  int unsigned count;

  always_comb begin
    count = 0;
    for (int unsigned i = 0; i < N; i++)
      if (a[i]) count += weight(i);
    set_f  = (count >= M);
    hold_f = |a;
  end

  if (M == 1 && RESET == RST_NONE) begin : g_or
    // TH1n: every asserted input reaches the threshold, no feedback needed.
    assign z = set_f;
  end else begin : g_hyst
    // Latch: opens while reset, set or "all inputs released" is true.
    logic rst_on, load, d;
    assign rst_on = (RESET != RST_NONE) && rst;
    assign load   = rst_on || set_f || !hold_f;
    assign d      = rst_on ? (RESET == RST_D) : set_f;
    always_latch
      if (load) z = d;
  end

endmodule
