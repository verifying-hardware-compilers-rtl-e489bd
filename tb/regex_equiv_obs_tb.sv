// Test of the equivalence observer on three pairs of expressions:
//  * dut_c  e :+: f against f :+: e (the default, commutativity): always equal
//  * dut_s  e :>: (f :>: g) against (e :>: f) :>: g (associativity): always
//           equal, and both hand the same starts to e, f and g
//  * dut_p  Input a against Plus (Input a): different languages, so ok must
//           go low exactly when "a" alone and "a a .. a" disagree
//  * dut_r1 Plus a :>: Plus a against a :>: Plus a, the first rewriting rule
//           of the expression simplifier: always equal, both matching aa+
//  * dut_r2 Plus (Plus (a :+: b)) against Plus (a :+: b), the second rule
// Free sub-circuit matches and the character are random; references come from
// the recorded history.
module regex_equiv_obs_tb;
  import regex_pkg::*;

  localparam int T = 1200;
  int checks = 0, failures = 0, n_differ = 0, n_agree_match = 0;

  logic clk = 1'b0, rst;
  logic start, a;
  logic [1:0] o2;
  logic [2:0] o3;
  logic c_ma, c_mb, c_ok, s_ma, s_mb, s_ok, p_ma, p_mb, p_ok;
  logic [1:0] c_sa, c_sb;
  logic [2:0] s_sa, s_sb;
  logic p_sa, p_sb;
  logic b;
  logic r1_ma, r1_mb, r1_ok, r2_ma, r2_mb, r2_ok;
  logic r1_sa, r1_sb, r2_sa, r2_sb;
  int n_r1 = 0, n_r2 = 0;

  always #5 clk = ~clk;

  regex_equiv_obs dut_c (
    .clk(clk), .rst(rst), .start(start), .sig(a), .circ_match(o2),
    .match_a(c_ma), .match_b(c_mb), .circ_start_a(c_sa), .circ_start_b(c_sb), .ok(c_ok)
  );

  regex_equiv_obs #(
    .NODES_A(5), .NODES_B(5), .NCIRC(3),
    // e :>: (f :>: g): 0 = seq(1,2), 1 = e, 2 = seq(3,4), 3 = f, 4 = g
    .PROG_A({re_circuit(8'd2), re_circuit(8'd1), re_seq(8'd3, 8'd4), re_circuit(8'd0), re_seq(8'd1, 8'd2)}),
    // (e :>: f) :>: g: 0 = seq(1,4), 1 = seq(2,3), 2 = e, 3 = f, 4 = g
    .PROG_B({re_circuit(8'd2), re_circuit(8'd1), re_circuit(8'd0), re_seq(8'd2, 8'd3), re_seq(8'd1, 8'd4)})
  ) dut_s (
    .clk(clk), .rst(rst), .start(start), .sig(a), .circ_match(o3),
    .match_a(s_ma), .match_b(s_mb), .circ_start_a(s_sa), .circ_start_b(s_sb), .ok(s_ok)
  );

  regex_equiv_obs #(
    .NODES_A(1), .NODES_B(2), .NCIRC(1),
    .PROG_A({re_input(8'd0)}),
    .PROG_B({re_input(8'd0), re_plus(8'd1)})
  ) dut_p (
    .clk(clk), .rst(rst), .start(start), .sig(a), .circ_match(1'b0),
    .match_a(p_ma), .match_b(p_mb), .circ_start_a(p_sa), .circ_start_b(p_sb), .ok(p_ok)
  );

  regex_equiv_obs #(
    .NODES_A(5), .NODES_B(4), .NSIG(1), .NCIRC(1),
    // 0 = seq(1,3), 1 = plus(2), 2 = a, 3 = plus(4), 4 = a
    .PROG_A({re_input(8'd0), re_plus(8'd4), re_input(8'd0), re_plus(8'd2), re_seq(8'd1, 8'd3)}),
    // 0 = seq(1,2), 1 = a, 2 = plus(3), 3 = a
    .PROG_B({re_input(8'd0), re_plus(8'd3), re_input(8'd0), re_seq(8'd1, 8'd2)})
  ) dut_r1 (
    .clk(clk), .rst(rst), .start(start), .sig(a), .circ_match(1'b0),
    .match_a(r1_ma), .match_b(r1_mb), .circ_start_a(r1_sa), .circ_start_b(r1_sb), .ok(r1_ok)
  );

  regex_equiv_obs #(
    .NODES_A(5), .NODES_B(4), .NSIG(2), .NCIRC(1),
    // 0 = plus(1), 1 = plus(2), 2 = alt(3,4), 3 = a, 4 = b
    .PROG_A({re_input(8'd1), re_input(8'd0), re_alt(8'd3, 8'd4), re_plus(8'd2), re_plus(8'd1)}),
    // 0 = plus(1), 1 = alt(2,3), 2 = a, 3 = b
    .PROG_B({re_input(8'd1), re_input(8'd0), re_alt(8'd2, 8'd3), re_plus(8'd1)})
  ) dut_r2 (
    .clk(clk), .rst(rst), .start(start), .sig({b, a}), .circ_match(1'b0),
    .match_a(r2_ma), .match_b(r2_mb), .circ_start_a(r2_sa), .circ_start_b(r2_sb), .ok(r2_ok)
  );

  logic hs [T], ha [T], hb [T];

  // a a+ : a start s <= t-2 with a high in every cycle s .. t-1
  function automatic logic ref_aaplus(input int t);
    for (int s = t - 1; s >= 0; s--) begin
      if (!ha[s]) return 1'b0;
      if (hs[s] && s <= t - 2) return 1'b1;
    end
    return 1'b0;
  endfunction

  // (a+b)+ : a start s < t with a or b high in every cycle s .. t-1
  function automatic logic ref_abplus(input int t);
    for (int s = t - 1; s >= 0; s--) begin
      if (!(ha[s] || hb[s])) return 1'b0;
      if (hs[s]) return 1'b1;
    end
    return 1'b0;
  endfunction

  // a+ : some start s < t with a high in every cycle s .. t-1
  function automatic logic ref_aplus(input int t);
    for (int s = t - 1; s >= 0; s--) begin
      if (!ha[s]) return 1'b0;
      if (hs[s]) return 1'b1;
    end
    return 1'b0;
  endfunction

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

  initial begin
    logic ea, eb;
    rst = 1'b1; start = 1'b0; a = 1'b0; b = 1'b0; o2 = '0; o3 = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < T; t++) begin
      start = ($urandom % 5) == 0;
      a = ($urandom % 4) != 0;
      o2 = 2'($urandom);
      o3 = 3'($urandom);
      b = ($urandom % 3) == 0;
      hs[t] = start; ha[t] = a; hb[t] = b;
      #1;
      check(c_ma, o2[0] | o2[1], "e+f match", t);
      check(c_mb, o2[0] | o2[1], "f+e match", t);
      check(c_ok, 1'b1, "commutativity", t);
      check(c_sa == {start, start} && c_sb == {start, start}, 1'b1, "alt starts", t);
      check(s_ma, o3[2], "e(fg) match", t);
      check(s_mb, o3[2], "(ef)g match", t);
      check(s_ok, 1'b1, "associativity", t);
      check(s_sa == {o3[1], o3[0], start}, 1'b1, "e(fg) starts", t);
      check(s_sb == {o3[1], o3[0], start}, 1'b1, "(ef)g starts", t);
      ea = (t >= 1) && hs[t-1] && ha[t-1];
      eb = ref_aplus(t);
      check(p_ma, ea, "a match", t);
      check(p_mb, eb, "a+ match", t);
      check(p_ok, ea == eb, "a against a+", t);
      if (ea != eb) n_differ++;
      if (ea && eb) n_agree_match++;
      check(r1_ma, ref_aaplus(t), "a+ a+ match", t);
      check(r1_mb, ref_aaplus(t), "a a+ match", t);
      check(r1_ok, 1'b1, "a+ a+ = a a+", t);
      check(r2_ma, ref_abplus(t), "((a+b)+)+ match", t);
      check(r2_mb, ref_abplus(t), "(a+b)+ match", t);
      check(r2_ok, 1'b1, "((a+b)+)+ = (a+b)+", t);
      if (r1_ma) n_r1++;
      if (r2_ma) n_r2++;
      @(posedge clk); #1;
    end
    $display("a and a+ differ in %0d cycles, both match in %0d", n_differ, n_agree_match);
    $display("rewriting rules exercised: aa+ matches %0d, (a+b)+ matches %0d", n_r1, n_r2);
    if (n_differ == 0 || n_agree_match == 0 || n_r1 == 0 || n_r2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
