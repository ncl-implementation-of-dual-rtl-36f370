// ncl_reg: a stage of WIDTH single-bit dual-rail NCL registers.
//
// Each bit is two resettable TH22 gates, one per rail, whose second input is
// the request ki from the following stage: the bit passes DATA only while ki
// is 1 (rfd) and passes NULL only while ki is 0 (rfn), and otherwise holds.
// So consecutive DATA wavefronts are always separated by a NULL wavefront.
// Each bit's acknowledge ko[i] is the NOR of its two output rails: rfn (0)
// when the bit holds DATA, rfd (1) when it holds NULL. The ko lines are meant
// for an ncl_completion instance.
//
// Reset (rst high) forces both rails to 0, i.e. the register holds NULL and
// requests data; the choice of resetting to NULL is this design's own.
// No clock.
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             rst,
  input  logic             ki,
  input  dr_t  [WIDTH-1:0] d,
  output dr_t  [WIDTH-1:0] q,
  output logic [WIDTH-1:0] ko
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ncl_th #(.N(2), .M(2), .RESET(RST_N)) u_r0 (.rst(rst), .a({ki, d[i].r0}), .z(q[i].r0));
    ncl_th #(.N(2), .M(2), .RESET(RST_N)) u_r1 (.rst(rst), .a({ki, d[i].r1}), .z(q[i].r1));
    assign ko[i] = ~(q[i].r0 | q[i].r1);

    // A dual-rail register must never see both rails asserted.
    always_comb
      if (!rst) assert (!(d[i].r0 && d[i].r1)) else $error("ncl_reg: illegal dual-rail input on bit %0d", i);
  end

endmodule
