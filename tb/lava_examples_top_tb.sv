// End-to-end test of the example top level at its default sizes (8-bit
// register array, 4-stage delay chain). All examples run at once from one
// random stimulus stream and each is compared with a reference:
//  * register array: loads on set, holds otherwise
//  * observed register: its observer and the "always" observer stay high
//  * delay chain: output is the input of 4 cycles earlier
//  * a(b+c)+: match from the language of the expression; ok from the
//    invariant at the root (the node-level check is in the compiler's own test)
//  * induction observers: plain case results from their closed forms
//  * commutativity observer: always high, matches equal e OR f
// The mechanisms are counted (loads, holds, matches through b and through c,
// Plus repetitions, overlapping starts, each failing induction case,
// invariant violations) and each must occur at least once.
module lava_examples_top_tb;
  localparam int T = 1500;
  localparam int NR = 8;
  localparam int ND = 4;
  int checks = 0, failures = 0;
  int n_load = 0, n_hold = 0, n_match_b = 0, n_match_c = 0, n_repeat = 0, n_overlap = 0;
  int n_ind_seq = 0, n_ind_input = 0, n_ind_t = 0, n_re_viol = 0, n_dly = 0, n_eq = 0;

  logic clk = 1'b0, rst;
  logic reg_set; logic [NR-1:0] reg_new, reg_now, reg_model;
  logic chk_set, chk_new, chk_current, chk_ok, chk_always_ok, chk_model;
  logic dly_in, dly_out;
  logic re_start, re_match, re_ok; logic [2:0] re_sig;
  logic ind_start, ind_a, ind_o1, ind_o2, ind_ok, ind_ok_temporal;
  logic [4:0] ind_sub_start, ind_sub_start_t;
  logic [3:0] ind_match, ind_match_t, ind_case_ok, ind_case_ok_t;
  logic eq_start, eq_match_a, eq_match_b, eq_ok; logic [1:0] eq_o;

  always #5 clk = ~clk;

  lava_examples_top dut (.*);

  logic hs [T], ha [T], hb [T], hc [T], hd [T];

  function automatic logic ref_abc(input int t);
    for (int s = t - 2; s >= 0; s--) begin
      if (!(hb[s+1] || hc[s+1])) return 1'b0;
      if (hs[s] && ha[s]) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic int len_abc(input int t);
    for (int s = t - 2; s >= 0; s--) begin
      if (!(hb[s+1] || hc[s+1])) return 0;
      if (hs[s] && ha[s]) return t - s;
    end
    return 0;
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
    logic prev_sa, e_seq, e_in, m;
    rst = 1'b1;
    reg_set = 0; reg_new = '0; chk_set = 0; chk_new = 0; dly_in = 0;
    re_start = 0; re_sig = '0; ind_start = 0; ind_a = 0; ind_o1 = 0; ind_o2 = 0;
    eq_start = 0; eq_o = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    reg_model = '0; chk_model = 1'b0; prev_sa = 1'b0;
    for (int t = 0; t < T; t++) begin
      reg_set = ($urandom % 4) == 0;  reg_new = NR'($urandom);
      chk_set = ($urandom % 3) == 0;  chk_new = 1'($urandom);
      dly_in = 1'($urandom);
      re_start = ($urandom % 7) == 0;
      re_sig = {1'(($urandom % 2) == 0), 1'(($urandom % 2) == 0), 1'(($urandom % 3) == 0)};
      ind_start = ($urandom % 4) == 0; ind_a = 1'($urandom);
      ind_o1 = ($urandom % 5) == 0;    ind_o2 = ($urandom % 5) == 0;
      eq_start = 1'($urandom); eq_o = 2'($urandom);
      hs[t] = re_start; ha[t] = re_sig[0]; hb[t] = re_sig[1]; hc[t] = re_sig[2]; hd[t] = dly_in;
      #1;

      if (reg_set) begin reg_model = reg_new; n_load++; end else n_hold++;
      check(reg_now == reg_model, 1'b1, "register array", t);
      if (chk_set) chk_model = chk_new;
      check(chk_current, chk_model, "observed register", t);
      check(chk_ok, 1'b1, "register observer", t);
      check(chk_always_ok, 1'b1, "always register observer", t);

      check(dly_out, (t >= ND) ? hd[t-ND] : 1'b0, "delay chain", t);
      if (t >= ND && hd[t-ND]) n_dly++;

      m = ref_abc(t);
      check(re_match, m, "a(b+c)+ match", t);
      if (m) begin
        if (hb[t-1]) n_match_b++;
        if (hc[t-1]) n_match_c++;
        if (len_abc(t) >= 3) n_repeat++;
      end
      if (m && re_start) n_overlap++;
      if (!re_ok) n_re_viol++;
      // A violation at the root needs a start while the expression matches.
      check(!re_ok && !(re_start && m), 1'b0, "a(b+c)+ invariant check", t);

      e_seq = !(!(ind_start && ind_o1) && !(ind_o1 && ind_o2)) || !(ind_start && ind_o2);
      e_in  = !(ind_start && prev_sa);
      check(ind_case_ok == {e_in, 1'b1, 1'b1, e_seq}, 1'b1, "induction cases", t);
      check(ind_ok, e_seq && e_in, "induction observer", t);
      check(ind_sub_start == {ind_start | ind_o1, ind_start, ind_start, ind_o1, ind_start}, 1'b1, "induction starts", t);
      check(ind_match == {prev_sa, ind_o1, ind_o1 | ind_o2, ind_o2}, 1'b1, "induction matches", t);
      check(ind_sub_start_t == ind_sub_start && ind_match_t == ind_match, 1'b1, "temporal form wiring", t);
      if (!e_seq) n_ind_seq++;
      if (!e_in) n_ind_input++;
      if (!ind_ok_temporal) n_ind_t++;

      check(eq_ok, 1'b1, "commutativity observer", t);
      check(eq_match_a, eq_o[0] | eq_o[1], "e+f match", t);
      check(eq_match_b, eq_o[0] | eq_o[1], "f+e match", t);
      if (eq_match_a) n_eq++;

      prev_sa = ind_start && ind_a;
      @(posedge clk); #1;
    end
    $display("loads %0d holds %0d delayed ones %0d", n_load, n_hold, n_dly);
    $display("regex matches via b %0d via c %0d repeats %0d overlaps %0d, invariant violations %0d",
             n_match_b, n_match_c, n_repeat, n_overlap, n_re_viol);
    $display("induction failures seq %0d input %0d temporal %0d, e+f matches %0d",
             n_ind_seq, n_ind_input, n_ind_t, n_eq);
    if (n_load == 0 || n_hold == 0 || n_dly == 0 || n_match_b == 0 || n_match_c == 0 ||
        n_repeat == 0 || n_overlap == 0 || n_re_viol == 0 || n_ind_seq == 0 ||
        n_ind_input == 0 || n_ind_t == 0 || n_eq == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
