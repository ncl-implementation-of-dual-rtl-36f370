// tb_ncl_booth_mult: self-checking testbench for the combinational NCL 8x8
// Booth2 multiplier core (no registers).
//
// All 65536 two's-complement operand pairs are applied as DATA wavefronts,
// each followed by a NULL wavefront; the product must be all DATA and equal to
// the signed product md * mr, and then all NULL again. Every 64th pair is
// first applied with one random operand bit still NULL: the product must not
// appear before the whole operand word is DATA. #1 per step; a watchdog bounds
// the run.
module tb_ncl_booth_mult;
  import ncl_pkg::*;

  dr_t [MD_W-1:0]   md;
  dr_t [MR_W-1:0]   mr;
  dr_t [PROD_W-1:0] p;
  int unsigned checks = 0, failures = 0;

  ncl_booth_mult dut (.md(md), .mr(mr), .p(p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [15:0] p_val();
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[i] = p[i].r1;
    return r;
  endfunction

  function automatic bit p_data();
    for (int i = 0; i < 16; i++) if (!dr_is_data(p[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit p_null();
    for (int i = 0; i < 16; i++) if (!dr_is_null(p[i])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : watchdog
    #(64'd400000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [7:0] a, b;
    logic signed [15:0] e;
    int unsigned k;
    md = '0;
    mr = '0;
    #1;
    check(p_null(), "product NULL at start");
    for (int unsigned v = 0; v < (1 << 16); v++) begin
      {b, a} = v[15:0];
      e = $signed(a) * $signed(b);
      for (int i = 0; i < 8; i++) begin md[i] = dr_enc(a[i]); mr[i] = dr_enc(b[i]); end
      if (v % 64 == 0) begin
        k = $urandom_range(15, 0);
        if (k < 8) md[k] = DR_NULL; else mr[k-8] = DR_NULL;
        #1;
        check(!p_data(), $sformatf("%0d * %0d: product before operand bit %0d", $signed(a), $signed(b), k));
        if (k < 8) md[k] = dr_enc(a[k]); else mr[k-8] = dr_enc(b[k-8]);
      end
      #1;
      check(p_data() && p_val() == e,
            $sformatf("%0d * %0d: got %0d expected %0d", $signed(a), $signed(b), $signed(p_val()), e));
      md = '0;
      mr = '0;
      #1;
      check(p_null(), "product back to NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
