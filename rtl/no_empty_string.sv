// noEmptyString invariant observer: start ==> NOT match.
// A compiled regular-expression circuit must not report a match in the same
// cycle in which it is started, since no expression of the language accepts
// the empty word. Combinational; ok is low exactly when start and match are
// both high.
module no_empty_string (
  input  logic start,
  input  logic match,
  output logic ok
);
  assign ok = ~(start & match);
endmodule
