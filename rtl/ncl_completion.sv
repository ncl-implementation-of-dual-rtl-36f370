// ncl_completion: full-word completion detection for an NCL register stage.
//
// Combines the N acknowledge lines (Ko) of a register stage into one request
// signal for the previous stage. Ko is 1 (request for data, rfd) while a bit
// holds NULL and 0 (request for null, rfn) while it holds DATA. The output
// changes only when all N lines agree: it goes to rfn once the whole word is
// DATA and back to rfd once the whole word is NULL. It is a tree of C-elements
// (THnn gates, at most TH44), grouping Ko lines by four from ko[0] upward, so
// it has ceil(log4 N) gate levels. No clock; the C-elements hold their value
// while the lines disagree.
module ncl_completion #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] ko,
  output logic         done
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

  assign node[0] = ko;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned WI = width_at(l);
    localparam int unsigned WO = width_at(l + 1);
    for (genvar i = 0; i < WO; i++) begin : g_grp
      localparam int unsigned SZ = (WI - 4 * i >= 4) ? 4 : WI - 4 * i;
      if (SZ == 1) begin : g_one
        assign node[l+1][i] = node[l][4*i];
      end else begin : g_gate
        ncl_th #(.N(SZ), .M(SZ)) u_g (.rst(1'b0), .a(node[l][4*i +: SZ]), .z(node[l+1][i]));
      end
    end
    if (WO < N) begin : g_pad
      assign node[l+1][N-1:WO] = '0;  // unused positions of a narrower level
    end
  end

  assign done = node[L][0];

endmodule
