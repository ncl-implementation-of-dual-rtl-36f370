// ncl_or_tree: OR of N signals built from TH1n gates of at most four inputs.
//
// The inputs are taken in groups of four from a[0] upward; each group feeds
// one TH1n gate and the group outputs are combined again the same way until
// one signal is left, ceil(log4 N) gate levels in all. Purely combinational
// (TH1n gates hold no state). Used to collect the minterm gates of a dual-rail
// function into its two rails.
module ncl_or_tree #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  output logic         z
);

  // number of signals on tree level l (level 0 = the inputs)
  function automatic int unsigned width_at(input int unsigned l);
    int unsigned w = N;
    for (int unsigned i = 0; i < l; i++) w = (w + 3) / 4;
    return w;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (width_at(l) > 1) l++;
    return l;
  endfunction

  localparam int unsigned L = num_levels();

  logic [N-1:0] node [L+1];

  assign node[0] = a;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned WI = width_at(l);
    localparam int unsigned WO = width_at(l + 1);
    for (genvar i = 0; i < WO; i++) begin : g_grp
      localparam int unsigned SZ = (WI - 4 * i >= 4) ? 4 : WI - 4 * i;
      if (SZ == 1) begin : g_one
        assign node[l+1][i] = node[l][4*i];
      end else begin : g_gate
        ncl_th #(.N(SZ), .M(1)) u_g (.rst(1'b0), .a(node[l][4*i +: SZ]), .z(node[l+1][i]));
      end
    end
    if (WO < N) begin : g_pad
      assign node[l+1][N-1:WO] = '0;  // unused positions of a narrower level
    end
  end

  assign z = node[L][0];

endmodule
