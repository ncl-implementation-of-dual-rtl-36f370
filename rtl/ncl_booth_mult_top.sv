// ncl_booth_mult_top: non-pipelined NCL 8x8 Booth2 multiplier system.
//
// input register (16 dual-rail bits: md, mr) -> ncl_booth_mult -> output
// register (16 dual-rail bits: product), each register with its full-word
// completion component. The output register's completion is the request ki
// of the input register, so the input register takes a new DATA wavefront
// only after the previous product has been stored and cleared to NULL again.
//
// Handshake with the environment (four-phase, no clock):
//   producer: waits for ko = 1 (rfd), drives md/mr to DATA, waits for ko = 0
//             (rfn: inputs captured), drives NULL, waits for ko = 1 again.
//   consumer: p becomes DATA while ki = 1 (rfd); the consumer takes it and
//             sets ki = 0 (rfn); p returns to NULL; the consumer sets ki = 1.
// rst (active high) resets both registers to NULL; hold md/mr at NULL and
// ki at 1 during reset. Registers resetting to NULL and the port names are
// this design's own choices.
//
// The output completion drives the input register, which drives the output
// register through the multiplier: a closed asynchronous loop, reported by
// simulators as a combinational loop. It is intended and it settles, since
// each signal changes at most once per wavefront.
module ncl_booth_mult_top
  import ncl_pkg::*;
(
  input  logic              rst,
  input  dr_t [MD_W-1:0]    md,
  input  dr_t [MR_W-1:0]    mr,
  output logic              ko,
  output dr_t [PROD_W-1:0]  p,
  input  logic              ki
);

  localparam int unsigned IN_W = MD_W + MR_W;

  dr_t  [IN_W-1:0]   in_q;
  logic [IN_W-1:0]   in_ko;
  dr_t  [PROD_W-1:0] prod_d;
  logic [PROD_W-1:0] out_ko;
  logic              out_done;

  ncl_reg #(.WIDTH(IN_W)) u_in_reg (
    .rst(rst), .ki(out_done), .d({mr, md}), .q(in_q), .ko(in_ko)
  );
  ncl_completion #(.N(IN_W)) u_in_cd (.ko(in_ko), .done(ko));

  ncl_booth_mult u_mult (
    .md(in_q[MD_W-1:0]), .mr(in_q[IN_W-1:MD_W]), .p(prod_d)
  );

  ncl_reg #(.WIDTH(PROD_W)) u_out_reg (
    .rst(rst), .ki(ki), .d(prod_d), .q(p), .ko(out_ko)
  );
  ncl_completion #(.N(PROD_W)) u_out_cd (.ko(out_ko), .done(out_done));

endmodule
