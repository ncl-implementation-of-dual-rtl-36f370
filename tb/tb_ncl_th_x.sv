// tb_ncl_th_x: self-checking testbench for the non-threshold NCL gates
// THxor0, THand0 and TH24comp.
//
// One instance of each is driven with the same random input sequence. A
// reference built from each gate's sum-of-products set equation and the
// hysteresis rule (assert on set, release only when all inputs are 0,
// otherwise hold) predicts every output. One vector per #1 step; a watchdog
// bounds the run.
module tb_ncl_th_x;
  import ncl_pkg::*;

  localparam int unsigned STEPS = 4000;

  logic [3:0] a;
  logic       zx, zand, zcomp, ex, eand, ecomp;
  int unsigned checks = 0, failures = 0;

  ncl_th_x #(.FUNC(TH_XOR0))   u_xor  (.a(a), .z(zx));
  ncl_th_x #(.FUNC(TH_AND0))   u_and  (.a(a), .z(zand));
  ncl_th_x #(.FUNC(TH_24COMP)) u_comp (.a(a), .z(zcomp));

  function automatic logic hyst(input logic set_f, input logic hold_f, input logic prev);
    return set_f ? 1'b1 : (hold_f ? prev : 1'b0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(64'd10 * STEPS + 64'd1000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic A, B, C, D;
    a = '0;
    #1;
    {ex, eand, ecomp} = '0;
    check({zx, zand, zcomp} == '0, "all gates 0 with inputs 0");
    for (int unsigned s = 0; s < STEPS; s++) begin
      if ($urandom_range(3, 0) == 0) a = '0;
      else a[$urandom_range(3, 0)] = $urandom_range(1, 0);
      {D, C, B, A} = a;
      ex    = hyst((A & B) | (C & D),                       |a, ex);
      eand  = hyst((A & B) | (B & C) | (A & D),             |a, eand);
      ecomp = hyst((A & C) | (B & C) | (A & D) | (B & D),   |a, ecomp);
      #1;
      check(zx == ex,       $sformatf("THxor0 a=%b", a));
      check(zand == eand,   $sformatf("THand0 a=%b", a));
      check(zcomp == ecomp, $sformatf("TH24comp a=%b", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
