// tb_ncl_reg: self-checking testbench for the dual-rail register stage
// ncl_reg at WIDTH = 4.
//
// Per step it sets ki and the input word (each bit NULL, DATA0 or DATA1) at
// random and predicts every output rail from the register rule: a rail rises
// when its input rail and ki are both 1 and falls when both are 0, otherwise
// holds (a TH22 gate per rail). ko must be the NOR of the two output rails.
// Reset must force NULL. Input words are kept legal (never both rails).
// One step per #1; a watchdog bounds the run.
module tb_ncl_reg;
  import ncl_pkg::*;

  localparam int unsigned W = 4;
  localparam int unsigned STEPS = 4000;

  logic         rst, ki;
  dr_t  [W-1:0] d, q, e;
  logic [W-1:0] ko;
  int unsigned checks = 0, failures = 0, n_pass_data = 0, n_block = 0;

  ncl_reg #(.WIDTH(W)) dut (.rst(rst), .ki(ki), .d(d), .q(q), .ko(ko));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic c2(input logic x, input logic y, input logic prev);
    return (x & y) ? 1'b1 : ((!x && !y) ? 1'b0 : prev);
  endfunction

  initial begin : watchdog
    #(64'd10 * STEPS + 64'd1000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    rst = 1'b1;
    ki = 1'b1;
    for (int i = 0; i < W; i++) d[i] = DR_DATA1;
    #1;
    for (int i = 0; i < W; i++) check(q[i] == DR_NULL && ko[i], "reset gives NULL and rfd");
    for (int i = 0; i < W; i++) d[i] = DR_NULL;
    #1;
    rst = 1'b0;
    #1;
    e = q;
    for (int unsigned s = 0; s < STEPS; s++) begin
      ki = $urandom_range(1, 0);
      for (int i = 0; i < W; i++)
        case ($urandom_range(2, 0))
          0: d[i] = DR_NULL;
          1: d[i] = DR_DATA0;
          default: d[i] = DR_DATA1;
        endcase
      for (int i = 0; i < W; i++) begin
        dr_t nx;
        nx.r0 = c2(d[i].r0, ki, e[i].r0);
        nx.r1 = c2(d[i].r1, ki, e[i].r1);
        if (!dr_is_data(e[i]) && dr_is_data(nx)) n_pass_data++;
        if (!ki && dr_is_null(e[i]) && dr_is_data(d[i])) n_block++;
        e[i] = nx;
      end
      #1;
      for (int i = 0; i < W; i++) begin
        check(q[i] == e[i], $sformatf("bit %0d: ki=%b d=%b q=%b expected %b", i, ki, d[i], q[i], e[i]));
        check(ko[i] == !(q[i].r0 | q[i].r1), $sformatf("bit %0d: ko", i));
      end
    end
    check(n_pass_data > 0 && n_block > 0, "DATA passed and DATA refused on rfn both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
