// Types shared by the regular-expression circuit compiler.
// A regular expression is passed to the compiler as a parameter: a packed
// array of nodes forming a tree, node 0 being the root. Each node names its
// operator, its sub-expressions by node index, and for a leaf the input
// signal (Input) or external sub-circuit port (Circuit) it stands for.
package regex_pkg;

  typedef enum logic [2:0] {
    RE_INPUT   = 3'd0,  // one character: the signal sig is high
    RE_SEQ     = 3'd1,  // left :>: right, left followed by right
    RE_ALT     = 3'd2,  // left :+: right, either of the two
    RE_PLUS    = 3'd3,  // Plus left, one or more repetitions
    RE_CIRCUIT = 3'd4   // an externally supplied sub-circuit, port sig
  } re_op_e;

  typedef struct packed {
    re_op_e     op;
    logic [7:0] left;   // node index of the first (or only) sub-expression
    logic [7:0] right;  // node index of the second sub-expression
    logic [7:0] sig;    // input signal index (RE_INPUT) or port index (RE_CIRCUIT)
  } re_node_t;

  function automatic re_node_t re_input(input logic [7:0] s);
    return '{op: RE_INPUT, left: 8'd0, right: 8'd0, sig: s};
  endfunction

  function automatic re_node_t re_seq(input logic [7:0] l, input logic [7:0] r);
    return '{op: RE_SEQ, left: l, right: r, sig: 8'd0};
  endfunction

  function automatic re_node_t re_alt(input logic [7:0] l, input logic [7:0] r);
    return '{op: RE_ALT, left: l, right: r, sig: 8'd0};
  endfunction

  function automatic re_node_t re_plus(input logic [7:0] l);
    return '{op: RE_PLUS, left: l, right: 8'd0, sig: 8'd0};
  endfunction

  function automatic re_node_t re_circuit(input logic [7:0] p);
    return '{op: RE_CIRCUIT, left: 8'd0, right: 8'd0, sig: p};
  endfunction

endpackage
