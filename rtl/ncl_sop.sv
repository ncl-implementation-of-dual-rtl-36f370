// ncl_sop: dual-rail NCL realisation of K Boolean functions of N (1..4)
// dual-rail variables, in the minterm style.
//
// For every input combination m that can occur (CARE[m] = 1) one THNN gate
// (a C-element of the rails that spell m, e.g. x[1].r0 and x[0].r1 for m=2'b01)
// fires once all N inputs are DATA and that combination is present. Output k's
// rail 1 is the TH1n OR of the minterms with TRUTH[k][m] = 1, its rail 0 the OR
// of the remaining cared-for minterms. Every output therefore waits for all
// inputs to become DATA (input-completeness) and returns to NULL only when all
// inputs are NULL again (hysteresis of the minterm gates), which is what makes
// the block delay-insensitive. A combination with CARE[m] = 0 gets no gate;
// it must never be presented. No clock.
module ncl_sop
  import ncl_pkg::*;
#(
  parameter int unsigned N = 2,
  parameter int unsigned K = 1,
  parameter logic [K-1:0][(1<<N)-1:0] TRUTH = 4'b0110,
  parameter logic [(1<<N)-1:0]        CARE  = '1
) (
  input  dr_t [N-1:0] x,
  output dr_t [K-1:0] y
);

  localparam int unsigned NM = 1 << N;

  function automatic int unsigned rail_count(input int unsigned k, input bit rail);
    int unsigned c = 0;
    for (int unsigned m = 0; m < NM; m++)
      if (CARE[m] && TRUTH[k][m] == rail) c++;
    return c;
  endfunction

  function automatic int unsigned rail_minterm(input int unsigned k, input bit rail,
                                               input int unsigned j);
    int unsigned c = 0;
    for (int unsigned m = 0; m < NM; m++)
      if (CARE[m] && TRUTH[k][m] == rail) begin
        if (c == j) return m;
        c++;
      end
    return 0;
  endfunction

  logic [NM-1:0] mt;

  for (genvar m = 0; m < NM; m++) begin : g_mt
    if (CARE[m]) begin : g_gate
      logic [N-1:0] lit;
      for (genvar i = 0; i < N; i++) begin : g_lit
        assign lit[i] = m[i] ? x[i].r1 : x[i].r0;
      end
      if (N == 1) begin : g_buf
        assign mt[m] = lit[0];
      end else begin : g_c
        ncl_th #(.N(N), .M(N)) u_c (.rst(1'b0), .a(lit), .z(mt[m]));
      end
    end else begin : g_none
      assign mt[m] = 1'b0;  // combination never presented
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_out
    for (genvar rail = 0; rail < 2; rail++) begin : g_rail
      localparam int unsigned C = rail_count(k, rail[0]);
      initial assert (C > 0) else $error("ncl_sop: output %0d rail %0d is never asserted", k, rail);
      logic [C-1:0] v;
      for (genvar j = 0; j < C; j++) begin : g_pick
        assign v[j] = mt[rail_minterm(k, rail[0], j)];
      end
      if (rail == 1) begin : g_r1
        ncl_or_tree #(.N(C)) u_or (.a(v), .z(y[k].r1));
      end else begin : g_r0
        ncl_or_tree #(.N(C)) u_or (.a(v), .z(y[k].r0));
      end
    end
  end

endmodule
