// tb_booth_decoder: self-checking testbench for booth_decoder.
//
// in = {mr2, mr1, mr0} feeds a middle-group decoder (outputs out[1:0] =
// {m2, m1}) and, through in[2:1] as {MR1, MR0}, a first-group decoder
// (out[3:2]) whose MR[-1] is 0. Expected selects follow the Booth2 table:
// m1 for +-MD (001, 010, 101, 110), m2 for +-2MD (011, 100). The first-group
// decoder does not read in[0], so only the middle one is held to the
// completeness rule.
// Every legal input combination is applied as one NCL wavefront pair: the
// inputs go from NULL to DATA one at a time in a random order, and back to
// NULL one at a time in another random order. The testbench checks that
// the middle-group decoder's output stays NULL until the last input has arrived (the block
// waits for the whole input word), that the DATA result equals a reference
// computed here from the Boolean equation, that it stays DATA until the last
// input has left (hysteresis) and that everything returns to NULL.
// Time advances in steps of #1; a watchdog bounds the run.
module tb_booth_decoder;
  import ncl_pkg::*;

  localparam int unsigned NI = 3;
  localparam int unsigned NO = 4;
  localparam int unsigned ROUNDS = 4;

  dr_t [NI-1:0] in;
  dr_t [NO-1:0] out;
  int unsigned checks = 0, failures = 0;

  booth_decoder #(.FIRST_GROUP(1'b0)) dut (.mr(in), .m1(out[0]), .m2(out[1]));
  booth_decoder #(.FIRST_GROUP(1'b1)) dut_first (.mr({in[2], in[1], DR_NULL}), .m1(out[2]), .m2(out[3]));

  // reference: output bits for input bits v (v[i] is in[i])
  function automatic logic [NO-1:0] ref_out(input logic [NI-1:0] v);
    logic [NO-1:0] r;
    r[0] = v[1] ^ v[0];
    r[1] = (v == 3'b011) || (v == 3'b100);
    r[2] = v[1];
    r[3] = v[2] & ~v[1];
    return r;
  endfunction

  function automatic bit legal(input logic [NI-1:0] v);
    return 1'b1;
  endfunction

  // outputs whose input-completeness is checked
  localparam logic [NO-1:0] COMPLETE = 4'b0011;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [NO-1:0] out_r1();
    logic [NO-1:0] r;
    for (int i = 0; i < NO; i++) r[i] = out[i].r1;
    return r;
  endfunction

  function automatic bit out_data(input logic [NO-1:0] mask);
    for (int i = 0; i < NO; i++) if (mask[i] && !dr_is_data(out[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit out_null(input logic [NO-1:0] mask);
    for (int i = 0; i < NO; i++) if (mask[i] && !dr_is_null(out[i])) return 1'b0;
    return 1'b1;
  endfunction

  task automatic shuffle(ref int unsigned ord [NI]);
    for (int i = NI - 1; i > 0; i--) begin
      int unsigned j = $urandom_range(i, 0);
      int unsigned t = ord[i];
      ord[i] = ord[j];
      ord[j] = t;
    end
  endtask

  initial begin : watchdog
    #(64'd100000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned ord [NI];
    logic [NI-1:0] v;
    logic [NO-1:0] e;
    for (int i = 0; i < NI; i++) in[i] = DR_NULL;
    #1;
    check(out_null('1), "outputs NULL at start");
    for (int unsigned rnd = 0; rnd < ROUNDS; rnd++) begin
      for (int unsigned vv = 0; vv < (1 << NI); vv++) begin
        v = vv[NI-1:0];
        if (!legal(v)) continue;
        e = ref_out(v);
        for (int i = 0; i < NI; i++) ord[i] = i;
        shuffle(ord);
        for (int k = 0; k < NI; k++) begin
          in[ord[k]] = dr_enc(v[ord[k]]);
          #1;
          if (k < NI - 1) check(out_null(COMPLETE), $sformatf("v=%b: output early after %0d inputs", v, k + 1));
        end
        check(out_data('1) && out_r1() == e, $sformatf("v=%b: got %b expected %b", v, out_r1(), e));
        shuffle(ord);
        for (int k = 0; k < NI; k++) begin
          in[ord[k]] = DR_NULL;
          #1;
          if (k < NI - 1) check(out_data(COMPLETE) && ((out_r1() & COMPLETE) == (e & COMPLETE)),
                                $sformatf("v=%b: output left DATA early", v));
        end
        check(out_null('1), $sformatf("v=%b: outputs back to NULL", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
