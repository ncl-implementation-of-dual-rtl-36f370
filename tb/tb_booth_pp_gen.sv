// tb_booth_pp_gen: self-checking testbench for the Booth2 partial-product
// generator.
//
// All 65536 (md, mr) pairs are applied as DATA wavefronts, each followed by a
// NULL wavefront. For each group j the testbench recodes {mr[2j+1], mr[2j],
// mr[2j-1]} itself (0, +-MD, +-2MD) and expects partial product j to be the
// 9-bit value |k|*MD, bit-inverted when the group is negative, and neg[j] to
// be mr[2j+1]. It checks that all outputs are DATA after the DATA wavefront and
// NULL after the NULL wavefront, and counts every group code. #1 per
// wavefront; a watchdog bounds the run.
module tb_booth_pp_gen;
  import ncl_pkg::*;

  dr_t [MD_W-1:0]             md;
  dr_t [MR_W-1:0]             mr;
  dr_t [NUM_PP-1:0][PP_W-1:0] pp;
  dr_t [NUM_PP-1:0]           neg;
  int unsigned checks = 0, failures = 0;
  int unsigned n_code [8];

  booth_pp_gen dut (.md(md), .mr(mr), .pp(pp), .neg(neg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(64'd300000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [7:0] a, b;
    logic [2:0] code;
    logic signed [9:0] prod;
    logic [8:0] e, got;
    bit all_null;
    foreach (n_code[c]) n_code[c] = 0;
    for (int i = 0; i < 8; i++) begin md[i] = DR_NULL; mr[i] = DR_NULL; end
    #1;
    for (int unsigned v = 0; v < (1 << 16); v++) begin
      {b, a} = v[15:0];
      for (int i = 0; i < 8; i++) begin md[i] = dr_enc(a[i]); mr[i] = dr_enc(b[i]); end
      #1;
      for (int j = 0; j < 4; j++) begin
        code = {b[2*j+1], b[2*j], (j == 0) ? 1'b0 : b[2*j-1]};
        n_code[code]++;
        case (code)
          3'b001, 3'b010, 3'b101, 3'b110: prod = $signed(a);
          3'b011, 3'b100:                 prod = 2 * $signed(a);
          default:                        prod = '0;
        endcase
        e = code[2] ? ~prod[8:0] : prod[8:0];
        for (int i = 0; i < PP_W; i++) got[i] = pp[j][i].r1;
        check(dr_is_data(neg[j]) && neg[j].r1 == b[2*j+1], $sformatf("v=%h neg[%0d]", v, j));
        check(got == e && (^pp[j]) !== 1'bx, $sformatf("v=%h pp[%0d]=%h expected %h", v, j, got, e));
        for (int i = 0; i < PP_W; i++)
          if (!dr_is_data(pp[j][i])) check(1'b0, $sformatf("v=%h pp[%0d][%0d] not DATA", v, j, i));
      end
      for (int i = 0; i < 8; i++) begin md[i] = DR_NULL; mr[i] = DR_NULL; end
      #1;
      all_null = 1'b1;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < PP_W; i++) if (!dr_is_null(pp[j][i])) all_null = 1'b0;
      check(all_null, $sformatf("v=%h: partial products back to NULL", v));
    end
    foreach (n_code[c]) check(n_code[c] > 0, $sformatf("group code %03b exercised", c[2:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
