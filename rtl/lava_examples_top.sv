// Top level: the example circuits side by side, each with its own ports.
//
//  * reg_*  an N_REG-bit set-register array (load on reg_set, hold otherwise)
//  * chk_*  a one-bit set register under its synchronous observer; chk_ok is
//           the observer's bit and chk_always_ok stays high only while chk_ok
//           has been high in every earlier cycle
//  * dly_*  a chain of N_DELAY delay elements
//  * re_*   the circuit compiled from the regular expression a(b+c)+, with
//           re_sig = {c, b, a}; re_ok is its built-in noEmptyString check
//  * ind_*  the structural-induction observers for noEmptyString, plain
//           (ind_ok) and temporal (ind_ok_temporal), fed with free
//           sub-circuit matches ind_o1, ind_o2 and Input character ind_a
//  * eq_*   the observer comparing e :+: f with f :+: e for free
//           sub-circuits e and f
//
// All state is clocked by clk and returns to its initial value on the
// synchronous reset rst. The examples share nothing but clock and reset.
module lava_examples_top #(
  parameter int unsigned N_REG   = 8,
  parameter int unsigned N_DELAY = 4
) (
  input  logic             clk,
  input  logic             rst,
  // register array
  input  logic             reg_set,
  input  logic [N_REG-1:0] reg_new,
  output logic [N_REG-1:0] reg_now,
  // observed one-bit register
  input  logic             chk_set,
  input  logic             chk_new,
  output logic             chk_current,
  output logic             chk_ok,
  output logic             chk_always_ok,
  // delay chain
  input  logic             dly_in,
  output logic             dly_out,
  // compiled regular expression a(b+c)+
  input  logic             re_start,
  input  logic [2:0]       re_sig,
  output logic             re_match,
  output logic             re_ok,
  // structural-induction observers
  input  logic             ind_start,
  input  logic             ind_a,
  input  logic             ind_o1,
  input  logic             ind_o2,
  output logic [4:0]       ind_sub_start,    // {plus1, alt2, alt1, seq2, seq1}
  output logic [3:0]       ind_match,        // {input, plus, alt, seq}
  output logic [3:0]       ind_case_ok,      // {input, plus, alt, seq}
  output logic             ind_ok,
  output logic [4:0]       ind_sub_start_t,  // the same for the temporal form
  output logic [3:0]       ind_match_t,
  output logic [3:0]       ind_case_ok_t,
  output logic             ind_ok_temporal,
  // equivalence observer for e :+: f = f :+: e over free sub-circuits
  input  logic             eq_start,
  input  logic [1:0]       eq_o,             // matches of e (bit 0) and f (bit 1)
  output logic             eq_match_a,       // match of e :+: f
  output logic             eq_match_b,       // match of f :+: e
  output logic             eq_ok
);

  set_register_array #(.N(N_REG)) u_reg_array (
    .clk(clk), .rst(rst), .set(reg_set), .new_in(reg_new), .now_out(reg_now)
  );

  check_register u_check (
    .clk(clk), .rst(rst), .set(chk_set), .new_in(chk_new),
    .current(chk_current), .ok(chk_ok)
  );

  always_obs u_check_always (.clk(clk), .rst(rst), .s(chk_ok), .ok(chk_always_ok));

  delay_n #(.N(N_DELAY)) u_delay (.clk(clk), .rst(rst), .din(dly_in), .dout(dly_out));

  // The a(b+c)+ expression has no Circuit leaf: its port is left open.
  logic re_circ_start;
  regex_circuit u_regex (
    .clk(clk), .rst(rst), .start(re_start), .sig(re_sig),
    .match(re_match), .ok(re_ok),
    .circ_start(re_circ_start), .circ_match(1'b0)
  );

  prove_structural_induction #(.TEMPORAL(1'b0)) u_induction (
    .clk(clk), .rst(rst), .start(ind_start), .a(ind_a), .o1(ind_o1), .o2(ind_o2),
    .seq_start1(ind_sub_start[0]), .seq_start2(ind_sub_start[1]),
    .alt_start1(ind_sub_start[2]), .alt_start2(ind_sub_start[3]),
    .plus_start1(ind_sub_start[4]),
    .seq_match(ind_match[0]), .alt_match(ind_match[1]),
    .plus_match(ind_match[2]), .input_match(ind_match[3]),
    .ok_seq(ind_case_ok[0]), .ok_alt(ind_case_ok[1]),
    .ok_plus(ind_case_ok[2]), .ok_input(ind_case_ok[3]),
    .ok(ind_ok)
  );

  prove_structural_induction #(.TEMPORAL(1'b1)) u_induction_temporal (
    .clk(clk), .rst(rst), .start(ind_start), .a(ind_a), .o1(ind_o1), .o2(ind_o2),
    .seq_start1(ind_sub_start_t[0]), .seq_start2(ind_sub_start_t[1]),
    .alt_start1(ind_sub_start_t[2]), .alt_start2(ind_sub_start_t[3]),
    .plus_start1(ind_sub_start_t[4]),
    .seq_match(ind_match_t[0]), .alt_match(ind_match_t[1]),
    .plus_match(ind_match_t[2]), .input_match(ind_match_t[3]),
    .ok_seq(ind_case_ok_t[0]), .ok_alt(ind_case_ok_t[1]),
    .ok_plus(ind_case_ok_t[2]), .ok_input(ind_case_ok_t[3]),
    .ok(ind_ok_temporal)
  );

  // The free sub-circuits ignore their start signals.
  logic [1:0] eq_circ_start_a, eq_circ_start_b;
  regex_equiv_obs u_equiv (
    .clk(clk), .rst(rst), .start(eq_start), .sig(1'b0), .circ_match(eq_o),
    .match_a(eq_match_a), .match_b(eq_match_b),
    .circ_start_a(eq_circ_start_a), .circ_start_b(eq_circ_start_b),
    .ok(eq_ok)
  );
endmodule
