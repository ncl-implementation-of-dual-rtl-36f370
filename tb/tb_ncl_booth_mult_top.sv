// tb_ncl_booth_mult_top: end-to-end test of the NCL 8x8 Booth2 multiplier
// system at its only size.
//
// Acts as producer and consumer of the four-phase NCL handshake and runs all
// 65536 operand pairs (exhaustive), comparing each product with md * mr
// computed by the testbench. Every fourth operation exercises back-pressure:
// the producer returns its inputs to NULL while the consumer still holds
// ki = rfd, so the output register must keep the old product, and then
// presents the next DATA, which the input register must refuse (ko stays rfd)
// until the consumer releases the output. It also counts the DATA and NULL
// wavefronts, every Booth2 group code of the selection table, and checks the
// rails never show the illegal 11 state. Time is in steps of #1; every wait
// is bounded and a watchdog ends a hung run.
module tb_ncl_booth_mult_top;
  import ncl_pkg::*;

  localparam int unsigned NUM_OPS = 1 << 16;
  localparam int unsigned MAX_WAIT = 200;

  logic               rst, ko, ki;
  dr_t [MD_W-1:0]     md;
  dr_t [MR_W-1:0]     mr;
  dr_t [PROD_W-1:0]   p;

  int unsigned checks = 0, failures = 0;
  int unsigned n_data = 0, n_null = 0, n_hold = 0, n_stall = 0;
  int unsigned n_code [8];

  ncl_booth_mult_top dut (.rst(rst), .md(md), .mr(mr), .ko(ko), .p(p), .ki(ki));

  function automatic bit all_data(input dr_t [PROD_W-1:0] v);
    for (int i = 0; i < PROD_W; i++) if (!dr_is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit all_null(input dr_t [PROD_W-1:0] v);
    for (int i = 0; i < PROD_W; i++) if (!dr_is_null(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [PROD_W-1:0] rails1(input dr_t [PROD_W-1:0] v);
    logic [PROD_W-1:0] r;
    for (int i = 0; i < PROD_W; i++) r[i] = v[i].r1;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic drive(input logic [7:0] a, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      md[i] = dr_enc(a[i]);
      mr[i] = dr_enc(b[i]);
    end
  endtask

  task automatic drive_null();
    for (int i = 0; i < 8; i++) begin
      md[i] = DR_NULL;
      mr[i] = DR_NULL;
    end
  endtask

  // wait for a condition, bounded by MAX_WAIT steps; count a failure on timeout
  task automatic wait_p_data(input string what);
    int unsigned n = 0;
    while (!all_data(p) && n < MAX_WAIT) begin #1; n++; end
    check(all_data(p), what);
  endtask

  task automatic wait_p_null(input string what);
    int unsigned n = 0;
    while (!all_null(p) && n < MAX_WAIT) begin #1; n++; end
    check(all_null(p), what);
  endtask

  task automatic wait_ko(input logic v, input string what);
    int unsigned n = 0;
    while (ko !== v && n < MAX_WAIT) begin #1; n++; end
    check(ko === v, what);
  endtask

  // illegal-state monitor on the product rails
  always @(p)
    for (int i = 0; i < PROD_W; i++)
      if (p[i].r1 && p[i].r0) begin
        #0;
        if (p[i].r1 && p[i].r0) begin
          failures++;
          $display("FAIL: product bit %0d shows both rails", i);
        end
      end

  initial begin : watchdog
    #(64'd40 * NUM_OPS + 64'd10000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [7:0] a, b;
    logic signed [15:0] expect_p;
    logic [2:0] code;
    bit pending;

    foreach (n_code[c]) n_code[c] = 0;
    rst = 1'b1;
    ki  = 1'b1;
    drive_null();
    #5;
    rst = 1'b0;
    #5;
    check(ko === 1'b1 && all_null(p), "after reset: ko = rfd, product NULL");

    pending = 1'b0;
    for (int unsigned op = 0; op < NUM_OPS; op++) begin
      a = op[7:0];
      b = op[15:8];
      expect_p = $signed(a) * $signed(b);
      for (int j = 0; j < 4; j++) begin
        code = {b[2*j+1], b[2*j], (j == 0) ? 1'b0 : b[2*j-1]};
        n_code[code]++;
      end

      if (!pending) begin
        wait_ko(1'b1, "producer: ko = rfd before DATA");
        drive(a, b);
      end
      wait_p_data($sformatf("op %0d: product becomes DATA", op));
      check(rails1(p) == expect_p,
            $sformatf("op %0d: %0d * %0d = %0d, got %0d", op, $signed(a), $signed(b),
                      expect_p, $signed(rails1(p))));
      check(ko === 1'b0, "ko = rfn while the operands are held");
      n_data++;

      if (op % 4 == 3 && op + 1 < NUM_OPS) begin
        // back-pressure: consumer keeps ki = rfd
        drive_null();
        wait_ko(1'b1, "inputs return to NULL under back-pressure");
        #3;
        check(all_data(p) && rails1(p) == expect_p, "output register holds product");
        n_hold++;
        drive((op + 1) & 8'hff, ((op + 1) >> 8) & 8'hff);
        #5;
        check(ko === 1'b1 && rails1(p) == expect_p, "next DATA refused while output full");
        n_stall++;
        ki = 1'b0;
        wait_p_null("product returns to NULL after release");
        wait_ko(1'b0, "stalled DATA captured after release");
        ki = 1'b1;
        pending = 1'b1;
      end else begin
        ki = 1'b0;
        drive_null();
        wait_p_null($sformatf("op %0d: product returns to NULL", op));
        wait_ko(1'b1, "ko = rfd after NULL");
        ki = 1'b1;
        pending = 1'b0;
      end
      n_null++;
    end

    $display("wavefronts: DATA %0d NULL %0d; output holds %0d; input stalls %0d",
             n_data, n_null, n_hold, n_stall);
    check(n_hold > 0, "output-hold case exercised");
    check(n_stall > 0, "input-stall case exercised");
    check(n_null > 0 && n_data == NUM_OPS, "all wavefronts seen");
    foreach (n_code[c]) begin
      $display("Booth group code %03b seen %0d times", c[2:0], n_code[c]);
      check(n_code[c] > 0, $sformatf("Booth code %03b exercised", c[2:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
