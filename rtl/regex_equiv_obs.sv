// Equivalence observer for two compiled regular expressions.
//
// Both expressions, PROG_A and PROG_B, are compiled with regex_circuit and fed
// the same start pulse, the same input signals and the same external
// sub-circuit matches; ok is high in every cycle in which the two match
// outputs agree. With Circuit leaves whose matches are free inputs, an ok that
// is high for every input sequence shows that a law of the algebra (such as
// e :+: f = f :+: e) holds for all sub-expressions. The default pair is that
// commutativity law over two free sub-circuits. Combinational from the inputs
// to ok, apart from the delay elements inside the compiled circuits.
module regex_equiv_obs
  import regex_pkg::*;
#(
  parameter int unsigned NODES_A = 3,
  parameter int unsigned NODES_B = 3,
  parameter int unsigned NSIG    = 1,
  parameter int unsigned NCIRC   = 2,
  parameter re_node_t [NODES_A-1:0] PROG_A = {
    re_circuit(8'd1), re_circuit(8'd0), re_alt(8'd1, 8'd2)   // e :+: f
  },
  parameter re_node_t [NODES_B-1:0] PROG_B = {
    re_circuit(8'd0), re_circuit(8'd1), re_alt(8'd1, 8'd2)   // f :+: e
  }
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NSIG-1:0]  sig,
  input  logic [NCIRC-1:0] circ_match,
  output logic             match_a,
  output logic             match_b,
  output logic [NCIRC-1:0] circ_start_a,  // what each side asks of the sub-circuits
  output logic [NCIRC-1:0] circ_start_b,
  output logic             ok
);
  logic ok_a_unused, ok_b_unused;  // invariant checks are not part of this observer

  regex_circuit #(.NODES(NODES_A), .NSIG(NSIG), .NCIRC(NCIRC), .PROG(PROG_A)) u_a (
    .clk(clk), .rst(rst), .start(start), .sig(sig),
    .match(match_a), .ok(ok_a_unused),
    .circ_start(circ_start_a), .circ_match(circ_match)
  );

  regex_circuit #(.NODES(NODES_B), .NSIG(NSIG), .NCIRC(NCIRC), .PROG(PROG_B)) u_b (
    .clk(clk), .rst(rst), .start(start), .sig(sig),
    .match(match_b), .ok(ok_b_unused),
    .circ_start(circ_start_b), .circ_match(circ_match)
  );

  assign ok = ~(match_a ^ match_b);
endmodule
