// tb_wallace_tree: self-checking testbench for the partial-product summation
// tree.
//
// Random rows w (16 bits), x (14), y (12), z (10) and correction bits r0, r3,
// r5, r7 are applied as DATA wavefronts, each followed by NULL. The expected
// product is the weighted sum w + 4x + 16y + 64z + r0 + 4 r3 + 16 r5 + 64 r7
// modulo 2^16. Also checked: the product is all DATA after DATA, all NULL
// after NULL, and it is not complete while any one input bit is still NULL
// (some product bits may appear early, but not all). #1 per step; a watchdog bounds the run.
module tb_wallace_tree;
  import ncl_pkg::*;

  localparam int unsigned VECTORS = 20000;

  dr_t [15:0] w;
  dr_t [13:0] x;
  dr_t [11:0] y;
  dr_t [9:0]  z;
  dr_t        r0, r3, r5, r7;
  dr_t [15:0] p;
  int unsigned checks = 0, failures = 0;

  wallace_tree dut (.w(w), .x(x), .y(y), .z(z), .r0(r0), .r3(r3), .r5(r5), .r7(r7), .p(p));

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

  task automatic set_rows(input logic [15:0] wv, input logic [13:0] xv, input logic [11:0] yv,
                          input logic [9:0] zv, input logic [3:0] rv);
    for (int i = 0; i < 16; i++) w[i] = dr_enc(wv[i]);
    for (int i = 0; i < 14; i++) x[i] = dr_enc(xv[i]);
    for (int i = 0; i < 12; i++) y[i] = dr_enc(yv[i]);
    for (int i = 0; i < 10; i++) z[i] = dr_enc(zv[i]);
    {r7, r5, r3, r0} = {dr_enc(rv[3]), dr_enc(rv[2]), dr_enc(rv[1]), dr_enc(rv[0])};
  endtask

  task automatic set_null();
    w = '0; x = '0; y = '0; z = '0;
    {r7, r5, r3, r0} = '0;
  endtask

  initial begin : watchdog
    #(64'd10 * VECTORS + 64'd1000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [15:0] wv, e;
    logic [13:0] xv;
    logic [11:0] yv;
    logic [9:0]  zv;
    logic [3:0]  rv;
    int unsigned k;
    set_null();
    #1;
    check(p_null(), "product NULL at start");
    for (int unsigned n = 0; n < VECTORS; n++) begin
      wv = $urandom(); xv = $urandom(); yv = $urandom(); zv = $urandom(); rv = $urandom();
      if (n < 4) begin  // corner cases: all zeros, all ones
        wv = {16{n[0]}}; xv = {14{n[0]}}; yv = {12{n[0]}}; zv = {10{n[0]}}; rv = {4{n[1]}};
      end
      e = wv + (16'(xv) << 2) + (16'(yv) << 4) + (16'(zv) << 6)
          + 16'(rv[0]) + (16'(rv[1]) << 2) + (16'(rv[2]) << 4) + (16'(rv[3]) << 6);
      set_rows(wv, xv, yv, zv, rv);
      if (n % 16 == 0) begin
        // hold back one random input bit: nothing may come out yet
        k = $urandom_range(15, 0);
        w[k] = DR_NULL;
        #1;
        check(!p_data(), $sformatf("vector %0d: product complete without w[%0d]", n, k));
        w[k] = dr_enc(wv[k]);
      end
      #1;
      check(p_data() && p_val() == e, $sformatf("vector %0d: got %h expected %h", n, p_val(), e));
      set_null();
      #1;
      check(p_null(), $sformatf("vector %0d: product back to NULL", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
