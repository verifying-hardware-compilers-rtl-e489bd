// Test of the structural-induction observers, plain and temporal, driven with
// unconstrained random start, character and sub-circuit matches.
//
// Expected values, worked out from the operator definitions with the
// invariant I(s, m) = NOT (s AND m):
//   sequence     ok = (I(s,o1) AND I(o1,o2)) ==> I(s,o2)
//   alternative  ok = (I(s,o1) AND I(s,o2)) ==> I(s, o1 OR o2)      (always 1)
//   Plus         ok = I(s OR o1, o1) ==> I(s,o1)                    (always 1)
//   Input        ok = I(s, previous (s AND a))
// In the temporal form the hypothesis of each operator is replaced by "it held
// in every earlier cycle" (reset to true). The test also checks the starts
// handed to the sub-circuits and the matches, and requires that each case
// that can fail did fail at least once.
module prove_structural_induction_tb;
  int checks = 0, failures = 0;
  int n_fail_seq = 0, n_fail_input = 0, n_fail_t_alt = 0, n_fail_t_plus = 0, n_fail_t_seq = 0;

  logic clk = 1'b0, rst;
  logic start, a, o1, o2;
  logic [4:0] sst, sst_t;
  logic [3:0] mt, mt_t, cok, cok_t;
  logic okp, okt;

  always #5 clk = ~clk;

  prove_structural_induction dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .o1(o1), .o2(o2),
    .seq_start1(sst[0]), .seq_start2(sst[1]), .alt_start1(sst[2]), .alt_start2(sst[3]), .plus_start1(sst[4]),
    .seq_match(mt[0]), .alt_match(mt[1]), .plus_match(mt[2]), .input_match(mt[3]),
    .ok_seq(cok[0]), .ok_alt(cok[1]), .ok_plus(cok[2]), .ok_input(cok[3]), .ok(okp)
  );

  prove_structural_induction #(.TEMPORAL(1'b1)) dutt (
    .clk(clk), .rst(rst), .start(start), .a(a), .o1(o1), .o2(o2),
    .seq_start1(sst_t[0]), .seq_start2(sst_t[1]), .alt_start1(sst_t[2]), .alt_start2(sst_t[3]), .plus_start1(sst_t[4]),
    .seq_match(mt_t[0]), .alt_match(mt_t[1]), .plus_match(mt_t[2]), .input_match(mt_t[3]),
    .ok_seq(cok_t[0]), .ok_alt(cok_t[1]), .ok_plus(cok_t[2]), .ok_input(cok_t[3]), .ok(okt)
  );

  function automatic logic inv(input logic s, input logic m);
    return !(s && m);
  endfunction

  task automatic check(input logic got, input logic exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %b expected %b", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_sa, e_seq, e_alt, e_plus, e_in, t_seq, t_alt, t_plus;
    logic h_seq, h_alt, h_plus;
    rst = 1'b1; start = 1'b0; a = 1'b0; o1 = 1'b0; o2 = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    prev_sa = 1'b0;
    h_seq = 1'b1; h_alt = 1'b1; h_plus = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 500 == 0 && t > 0) begin
        // restart the temporal hypothesis now and then
        rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
        prev_sa = 1'b0; h_seq = 1'b1; h_alt = 1'b1; h_plus = 1'b1;
      end
      // Mostly-quiet stimulus so that the temporal hypothesis survives a while.
      start = ($urandom % 4) == 0;
      a     = ($urandom % 2) == 0;
      o1    = ($urandom % 5) == 0;
      o2    = ($urandom % 5) == 0;
      #1;
      // starts and matches
      check(sst[0], start, "seq start 1", t);
      check(sst[1], o1, "seq start 2", t);
      check(sst[2], start, "alt start 1", t);
      check(sst[3], start, "alt start 2", t);
      check(sst[4], start | o1, "plus start", t);
      check(mt[0], o2, "seq match", t);
      check(mt[1], o1 | o2, "alt match", t);
      check(mt[2], o1, "plus match", t);
      check(mt[3], prev_sa, "input match", t);
      check(sst_t == sst, 1'b1, "temporal starts", t);
      check(mt_t[3], prev_sa, "temporal input match", t);

      e_seq  = !(inv(start, o1) && inv(o1, o2)) || inv(start, o2);
      e_alt  = !(inv(start, o1) && inv(start, o2)) || inv(start, o1 | o2);
      e_plus = !inv(start | o1, o1) || inv(start, o1);
      e_in   = inv(start, prev_sa);
      check(cok[0], e_seq, "plain seq", t);
      check(cok[1], e_alt, "plain alt", t);
      check(cok[2], e_plus, "plain plus", t);
      check(cok[3], e_in, "plain input", t);
      check(okp, e_seq && e_alt && e_plus && e_in, "plain ok", t);
      if (!e_seq) n_fail_seq++;
      if (!e_in) n_fail_input++;

      t_seq  = !h_seq  || inv(start, o2);
      t_alt  = !h_alt  || inv(start, o1 | o2);
      t_plus = !h_plus || inv(start, o1);
      check(cok_t[0], t_seq, "temporal seq", t);
      check(cok_t[1], t_alt, "temporal alt", t);
      check(cok_t[2], t_plus, "temporal plus", t);
      check(cok_t[3], e_in, "temporal input", t);
      check(okt, t_seq && t_alt && t_plus && e_in, "temporal ok", t);
      if (!t_seq) n_fail_t_seq++;
      if (!t_alt) n_fail_t_alt++;
      if (!t_plus) n_fail_t_plus++;

      h_seq  = h_seq  && inv(start, o1) && inv(o1, o2);
      h_alt  = h_alt  && inv(start, o1) && inv(start, o2);
      h_plus = h_plus && inv(start | o1, o1);
      prev_sa = start && a;
      @(posedge clk); #1;
    end
    $display("plain failures: seq %0d input %0d; temporal failures: seq %0d alt %0d plus %0d",
             n_fail_seq, n_fail_input, n_fail_t_seq, n_fail_t_alt, n_fail_t_plus);
    if (n_fail_seq == 0 || n_fail_input == 0 || n_fail_t_seq == 0 || n_fail_t_alt == 0 || n_fail_t_plus == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
