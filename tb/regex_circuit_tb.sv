// Test of the regular-expression compiler.
//
//  * dut   the default expression a(b+c)+, plain invariant check
//  * dutt  the same expression, temporal invariant check
//  * dut2  (a :>: b)+ :+: c
//  * dut3  Circuit0 :>: Plus Circuit1, with free external sub-circuits
//
// match is compared every cycle with a reference computed from the recorded
// input history and the language of each expression (a word of length n
// started in cycle s is reported in cycle s+n). ok is compared with the
// invariant worked out node by node from the start/match behaviour of each
// sub-expression. The test counts matches through b and through c, Plus
// repetitions, overlapping starts and invariant violations, and fails if any
// of them never happened.
module regex_circuit_tb;
  import regex_pkg::*;

  localparam int T = 1500;
  int checks = 0, failures = 0;
  int n_match_b = 0, n_match_c = 0, n_repeat = 0, n_overlap = 0;
  int n_viol = 0, n_viol_t = 0, n_match2_ab = 0, n_match2_c = 0;

  logic clk = 1'b0, rst;
  logic start;
  logic [2:0] sig;          // {c, b, a}
  logic [1:0] cm;           // external sub-circuit matches for dut3
  logic match, ok, match_t, ok_t, match2, ok2, match3, ok3;
  logic [1:0] cs3;
  logic unused_cs, unused_cs_t, unused_cs2;

  always #5 clk = ~clk;

  regex_circuit dut (.clk(clk), .rst(rst), .start(start), .sig(sig), .match(match), .ok(ok),
                     .circ_start(unused_cs), .circ_match(1'b0));

  regex_circuit #(.TEMPORAL(1'b1)) dutt (.clk(clk), .rst(rst), .start(start), .sig(sig),
                     .match(match_t), .ok(ok_t), .circ_start(unused_cs_t), .circ_match(1'b0));

  regex_circuit #(
    .NODES(6),
    .PROG({re_input(8'd2), re_input(8'd1), re_input(8'd0), re_seq(8'd3, 8'd4), re_plus(8'd2), re_alt(8'd1, 8'd5)})
  ) dut2 (.clk(clk), .rst(rst), .start(start), .sig(sig), .match(match2), .ok(ok2),
          .circ_start(unused_cs2), .circ_match(1'b0));

  regex_circuit #(
    .NODES(4), .NSIG(1), .NCIRC(2),
    .PROG({re_circuit(8'd1), re_plus(8'd3), re_circuit(8'd0), re_seq(8'd1, 8'd2)})
  ) dut3 (.clk(clk), .rst(rst), .start(start), .sig(sig[0]), .match(match3), .ok(ok3),
          .circ_start(cs3), .circ_match(cm));

  // Recorded inputs, index = cycle after reset.
  logic hs [T], ha [T], hb [T], hc [T];

  // a(b+c)+ : a word "a x1 .. xn", n >= 1, each xi being b or c.
  function automatic logic ref_abc(input int t);
    for (int s = t - 2; s >= 0; s--) begin
      if (!(hb[s+1] || hc[s+1])) return 1'b0;
      if (hs[s] && ha[s]) return 1'b1;
    end
    return 1'b0;
  endfunction

  // (b+c)+ started by the given start history (used for the Plus node).
  function automatic logic ref_bcplus(input int t, ref logic st [T]);
    for (int s = t - 1; s >= 0; s--) begin
      if (!(hb[s] || hc[s])) return 1'b0;
      if (st[s]) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Length of the shortest word of a(b+c)+ ending now, 0 if none.
  function automatic int len_abc(input int t);
    for (int s = t - 2; s >= 0; s--) begin
      if (!(hb[s+1] || hc[s+1])) return 0;
      if (hs[s] && ha[s]) return t - s;
    end
    return 0;
  endfunction

  // (a b)+ + c
  function automatic logic ref_ab_c(input int t, output logic by_ab);
    by_ab = 1'b0;
    for (int p = t - 2; p >= 0; p -= 2) begin
      if (!(ha[p] && hb[p+1])) break;
      if (hs[p]) begin by_ab = 1'b1; break; end
    end
    return by_ab || (t >= 1 && hs[t-1] && hc[t-1]);
  endfunction

  // Start signal of the Plus node of a(b+c)+: the match of its "a".
  logic st2 [T];

  task automatic check(input logic got, input logic exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %b expected %b", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic h3, h2, h0;  // "always" state of the temporal check, per operator node

  initial begin
    logic m1, m2, st3, m4, m5, m3, inv0, inv1, inv2, inv3, inv4, inv5;
    logic ok1, ok2e, ok3e, ok4, ok5, ok0e, ok3t, ok2t, ok0t, e2, by_ab;
    // Node start of b and c in cycle t-1 is st3 of that cycle: the Plus
    // node's start or its own match.
    int active;
    rst = 1'b1; start = 1'b0; sig = '0; cm = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    h3 = 1'b1; h2 = 1'b1; h0 = 1'b1;
    active = 0;
    for (int t = 0; t < T; t++) begin
      // Stimulus: bursts of starts, characters mostly b or c.
      start = ($urandom % 7) == 0;
      sig[0] = ($urandom % 3) == 0;
      sig[1] = ($urandom % 2) == 0;
      sig[2] = ($urandom % 2) == 0;
      cm = 2'($urandom);
      hs[t] = start; ha[t] = sig[0]; hb[t] = sig[1]; hc[t] = sig[2];
      #1;

      // match outputs
      check(match,   ref_abc(t), "a(b+c)+ match", t);
      check(match_t, ref_abc(t), "a(b+c)+ match (temporal)", t);
      e2 = ref_ab_c(t, by_ab);
      check(match2, e2, "(ab)+ + c match", t);
      if (e2 && by_ab) n_match2_ab++;
      if (e2 && !by_ab) n_match2_c++;
      check(match3, cm[1], "circuit match", t);
      check(cs3[0], start, "circuit 0 start", t);
      check(cs3[1], cm[0] | cm[1], "circuit 1 start", t);

      if (ref_abc(t)) begin
        if (hb[t-1]) n_match_b++;
        if (hc[t-1]) n_match_c++;
        if (len_abc(t) >= 3) n_repeat++;
        if (start) n_overlap++;
      end

      // Node-level behaviour of a(b+c)+:
      // 0 = a :>: P, 1 = a, 2 = P = Plus 3, 3 = b :+: c, 4 = b, 5 = c
      m1 = (t >= 1) && hs[t-1] && ha[t-1];
      st2[t] = m1;
      m2 = ref_bcplus(t, st2);
      st3 = m1 | m2;
      m4 = (t >= 1) && (st2[t-1] || ref_bcplus(t - 1, st2)) && hb[t-1];
      m5 = (t >= 1) && (st2[t-1] || ref_bcplus(t - 1, st2)) && hc[t-1];
      m3 = m4 | m5;
      inv0 = !(start && m2);
      inv1 = !(start && m1);
      inv2 = !(m1 && m2);
      inv3 = !(st3 && m3);
      inv4 = !(st3 && m4);
      inv5 = !(st3 && m5);
      ok1 = inv1; ok4 = inv4; ok5 = inv5;
      ok3e = !(ok4 && ok5) || inv3;
      ok2e = !ok3e || inv2;
      ok0e = !(ok1 && ok2e) || inv0;
      check(ok, ok0e, "plain invariant check", t);
      if (!ok0e) n_viol++;
      ok3t = !h3 || inv3;
      ok2t = !h2 || inv2;
      ok0t = !h0 || inv0;
      check(ok_t, ok0t, "temporal invariant check", t);
      if (!ok0t) n_viol_t++;

      @(posedge clk); #1;
      h3 = h3 && ok4 && ok5;
      h2 = h2 && ok3t;
      h0 = h0 && ok1 && ok2t;
    end

    $display("matches via b %0d via c %0d, repetitions %0d, overlapping starts %0d",
             n_match_b, n_match_c, n_repeat, n_overlap);
    $display("(ab)+ matches %0d, c matches %0d, invariant violations plain %0d temporal %0d",
             n_match2_ab, n_match2_c, n_viol, n_viol_t);
    if (n_match_b == 0 || n_match_c == 0 || n_repeat == 0 || n_overlap == 0) failures++;
    if (n_match2_ab == 0 || n_match2_c == 0 || n_viol == 0 || n_viol_t == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
