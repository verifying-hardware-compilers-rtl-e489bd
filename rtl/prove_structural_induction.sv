// Structural-induction observer for the noEmptyString invariant.
//
// One instance of the compiler is built for each operator, with its
// sub-expressions replaced by Circuit leaves whose match signals are free
// inputs (o1, o2): sequence and alternative of two such sub-circuits, Plus of
// one, and a single Input character. Each instance reports, through its ok
// output, whether the operator keeps the invariant given that its
// sub-circuits keep theirs; ok is the AND of the four cases. If ok is high for
// every input sequence, the invariant holds for every expression the
// compiler accepts, by induction over the expression.
//
// With the gate-level construction of regex_circuit and fully free inputs,
// the alternative and Plus cases always hold, while the sequence case fails
// when start and o2 are high with o1 low, and the Input case fails when start
// is high in two consecutive cycles with a high in the first: noEmptyString
// checked cycle by cycle is not inductive for those two operators unless the
// environment restricts start. The observer reports this faithfully; it does
// not constrain its inputs.
//
// The sub-circuits' start signals (what the operator asks of them) are
// brought out as seq_start1/2, alt_start1/2 and plus_start1 so that an
// environment can model sub-circuits that react to them, and each instance's
// match is brought out as well. The Input case has no sub-circuit; its
// Circuit port is left unconnected inside. TEMPORAL selects the
// plain (0) or temporal (1) form of the induction hypothesis, as in
// regex_circuit. Combinational from inputs to ok apart from the delay of the
// Input case and, with TEMPORAL = 1, the always observers.
module prove_structural_induction
  import regex_pkg::*;
#(
  parameter bit TEMPORAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic a,        // input character for the Input case
  input  logic o1,       // match of the first free sub-circuit
  input  logic o2,       // match of the second free sub-circuit
  output logic seq_start1,
  output logic seq_start2,
  output logic alt_start1,
  output logic alt_start2,
  output logic plus_start1,
  output logic seq_match,  // match of each operator instance
  output logic alt_match,
  output logic plus_match,
  output logic input_match,
  output logic ok_seq,
  output logic ok_alt,
  output logic ok_plus,
  output logic ok_input,
  output logic ok
);
  regex_circuit #(
    .NODES(3), .NSIG(1), .NCIRC(2), .TEMPORAL(TEMPORAL),
    .PROG({re_circuit(8'd1), re_circuit(8'd0), re_seq(8'd1, 8'd2)})
  ) u_seq (
    .clk(clk), .rst(rst), .start(start), .sig(a),
    .match(seq_match), .ok(ok_seq),
    .circ_start({seq_start2, seq_start1}), .circ_match({o2, o1})
  );

  regex_circuit #(
    .NODES(3), .NSIG(1), .NCIRC(2), .TEMPORAL(TEMPORAL),
    .PROG({re_circuit(8'd1), re_circuit(8'd0), re_alt(8'd1, 8'd2)})
  ) u_alt (
    .clk(clk), .rst(rst), .start(start), .sig(a),
    .match(alt_match), .ok(ok_alt),
    .circ_start({alt_start2, alt_start1}), .circ_match({o2, o1})
  );

  regex_circuit #(
    .NODES(2), .NSIG(1), .NCIRC(1), .TEMPORAL(TEMPORAL),
    .PROG({re_circuit(8'd0), re_plus(8'd1)})
  ) u_plus (
    .clk(clk), .rst(rst), .start(start), .sig(a),
    .match(plus_match), .ok(ok_plus),
    .circ_start(plus_start1), .circ_match(o1)
  );

  logic input_circ_start;
  regex_circuit #(
    .NODES(1), .NSIG(1), .NCIRC(1), .TEMPORAL(TEMPORAL),
    .PROG({re_input(8'd0)})
  ) u_input (
    .clk(clk), .rst(rst), .start(start), .sig(a),
    .match(input_match), .ok(ok_input),
    .circ_start(input_circ_start), .circ_match(1'b0)
  );

  assign ok = ok_seq & ok_alt & ok_plus & ok_input;
endmodule
