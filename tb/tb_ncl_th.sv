// tb_ncl_th: self-checking testbench for the threshold gate ncl_th.
//
// Six gate configurations are driven with the same random input sequence:
// TH12 (OR), TH23, TH34w2 (Z = AB + AC + AD + BCD, input A weighted 2),
// TH44, TH54w322 (Z = AB + AC + BCD) and a resettable TH22n. For each, a
// reference written from the gate's Boolean set equation and the hysteresis
// rule (assert on set, release only when all inputs are 0, otherwise keep the
// previous output) predicts every output. The TH22n gate is also checked to
// go to 0 under reset. One input vector per #1 step; a watchdog bounds the run.
module tb_ncl_th;
  import ncl_pkg::*;

  localparam int unsigned STEPS = 4000;

  logic [3:0] a;
  logic       rst;
  logic       z12, z23, z34w2, z44, z54w322, z22n;
  logic       e12, e23, e34w2, e44, e54w322, e22n;
  int unsigned checks = 0, failures = 0;

  ncl_th #(.N(2), .M(1))                        u12      (.rst(1'b0), .a(a[1:0]), .z(z12));
  ncl_th #(.N(3), .M(2))                        u23      (.rst(1'b0), .a(a[2:0]), .z(z23));
  ncl_th #(.N(4), .M(3), .W1(2))                u34w2    (.rst(1'b0), .a(a),      .z(z34w2));
  ncl_th #(.N(4), .M(4))                        u44      (.rst(1'b0), .a(a),      .z(z44));
  ncl_th #(.N(4), .M(5), .W1(3), .W2(2), .W3(2)) u54w322 (.rst(1'b0), .a(a),      .z(z54w322));
  ncl_th #(.N(2), .M(2), .RESET(RST_N))         u22n     (.rst(rst),  .a(a[1:0]), .z(z22n));

  // next value of a hysteresis gate
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
    rst = 1'b1;
    a = 4'b0011;
    #1;
    check(z22n == 1'b0, "TH22n held at 0 by reset");
    a = 4'b0000;
    #1;
    rst = 1'b0;
    #1;
    {e12, e23, e34w2, e44, e54w322, e22n} = '0;
    check({z12, z23, z34w2, z44, z54w322, z22n} == '0, "all gates 0 with inputs 0");
    for (int unsigned s = 0; s < STEPS; s++) begin
      // bias toward few changes so that partial input sets are frequent
      if ($urandom_range(3, 0) == 0) a = '0;
      else a[$urandom_range(3, 0)] = $urandom_range(1, 0);
      {D, C, B, A} = a;
      e12     = hyst(A | B,                          A | B,         e12);
      e23     = hyst((A & B) | (A & C) | (B & C),    A | B | C,     e23);
      e34w2   = hyst((A & B) | (A & C) | (A & D) | (B & C & D), |a, e34w2);
      e44     = hyst(A & B & C & D,                  |a,            e44);
      e54w322 = hyst((A & B) | (A & C) | (B & C & D), |a,           e54w322);
      e22n    = hyst(A & B,                          A | B,         e22n);
      #1;
      check(z12 == e12,         $sformatf("TH12 a=%b", a));
      check(z23 == e23,         $sformatf("TH23 a=%b", a));
      check(z34w2 == e34w2,     $sformatf("TH34w2 a=%b", a));
      check(z44 == e44,         $sformatf("TH44 a=%b", a));
      check(z54w322 == e54w322, $sformatf("TH54w322 a=%b", a));
      check(z22n == e22n,       $sformatf("TH22n a=%b", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
