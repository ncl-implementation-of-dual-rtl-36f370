// ncl_pkg: types and constants shared by the NULL Convention Logic (NCL)
// Booth2 multiplier.
//
// A dual-rail signal carries one bit as two wires. {r1,r0} = 2'b01 is DATA0,
// 2'b10 is DATA1, 2'b00 is NULL (no data yet) and 2'b11 is illegal. The
// multiplier's sizes (8-bit multiplicand MD and multiplier MR, four Booth2
// partial products of 9 bits, a 16-bit product) are fixed by the design.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // rail 1: asserted for DATA1
    logic r0;  // rail 0: asserted for DATA0
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // Reset kind of a resettable threshold gate: none, 'n' (reset to 0) or
  // 'd' (reset to 1).
  typedef enum logic [1:0] {
    RST_NONE = 2'd0,
    RST_N    = 2'd1,
    RST_D    = 2'd2
  } ncl_reset_e;

  // The three fundamental NCL gates whose set function is not a weighted
  // threshold: THxor0 = AB + CD, THand0 = AB + BC + AD,
  // TH24comp = AC + BC + AD + BD.
  typedef enum logic [1:0] {
    TH_XOR0   = 2'd0,
    TH_AND0   = 2'd1,
    TH_24COMP = 2'd2
  } ncl_special_e;

  localparam int unsigned MD_W   = 8;          // multiplicand width
  localparam int unsigned MR_W   = 8;          // multiplier width
  localparam int unsigned NUM_PP = MR_W / 2;   // Booth2 partial products
  localparam int unsigned PP_W   = MD_W + 1;   // bits of one partial product
  localparam int unsigned PROD_W = MD_W + MR_W;

  // Rail access helpers.
  function automatic dr_t dr_enc(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return !(d.r1 || d.r0);
  endfunction

endpackage
