// tb_ncl_completion: self-checking testbench for ncl_completion at N = 16.
//
// Drives Ko lines the way an NCL register stage does: within a phase the
// lines only move one way, falling to rfn (0) one random group at a time as
// the word becomes DATA, then rising to rfd (1) as it becomes NULL. The output
// must fall only once all 16 lines are 0 and rise only once all 16 are 1, and
// otherwise keep its value. (A tree of C-elements equals one wide C-element
// only for such monotonic inputs, which the NCL protocol guarantees.)
// One step per #1; a watchdog bounds the run.
module tb_ncl_completion;

  localparam int unsigned N = 16;
  localparam int unsigned STEPS = 20000;

  logic [N-1:0] ko;
  logic         done, e;
  int unsigned checks = 0, failures = 0, n_rise = 0, n_fall = 0;

  ncl_completion #(.N(N)) dut (.ko(ko), .done(done));

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
    ko = '1;
    #1;
    e = 1'b1;
    check(done == 1'b1, "all rfd gives rfd");
    for (int unsigned s = 0; s < STEPS; s++) begin
      logic [N-1:0] mask;
      mask = $urandom() & $urandom();  // lines moving this step
      if (e) ko = ko & ~mask;           // DATA phase: lines fall
      else   ko = ko | mask;            // NULL phase: lines rise
      if (ko == '0 && e) begin e = 1'b0; n_fall++; end
      else if (ko == '1 && !e) begin e = 1'b1; n_rise++; end
      #1;
      check(done == e, $sformatf("ko=%h: done=%b expected %b", ko, done, e));
    end
    check(n_rise > 0 && n_fall > 0, "both transitions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
