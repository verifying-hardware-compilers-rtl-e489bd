// Regular-expression circuit compiler.
//
// The expression is given as the parameter PROG, a tree of regex_pkg::re_node_t
// nodes with the root at index 0; elaboration turns it into a circuit, the way
// a hardware compiler turns a program into gates. Every node gets a start and a
// match wire. Pulsing start asks the node to begin reading the input signals;
// match(t) is high when the signals sampled from some cycle s < t in which
// start was high, up to cycle t-1, spell a word of the node's language.
//
//   Input a     match = delay(start AND a), a delay element starting low
//   e :>: f     e starts with start, f starts with e's match, match = f's match
//   e :+: f     both start with start, match = e's match OR f's match
//   Plus e      e starts with start OR e's own match, match = e's match
//   Circuit k   start goes out on circ_start[k], match comes in on circ_match[k]
//
// The start/match interface, the operator set (no empty word, no star) and
// the Circuit leaf follow the compiler this implements; the per-operator
// gates above are this design's own, the simplest construction with that
// interface.
//
// Circuit leaves stand for sub-circuits that are supplied from outside, which
// is how the structural-induction observers feed a single operator with
// arbitrary sub-circuit behaviour.
//
// Each node also carries an invariant check, ok, for the fixed invariant
// noEmptyString (start ==> NOT match). A leaf reports the invariant itself;
// an operator node reports "children ok ==> invariant holds here". With
// TEMPORAL = 0 the children's ok is used as it is (plain structural
// induction); with TEMPORAL = 1 it is first passed through an "always"
// observer, so an operator only has to satisfy the invariant while its
// children have satisfied theirs in every earlier cycle (temporal induction).
// The "always" observer covers the cycles before the current one only, as in
// its definition, so the current cycle's child results do not guard it.
//
// Latency: one cycle per Input character, no combinational path from start to
// match except through Circuit leaves. The default PROG is a(b+c)+ over three
// signals a = sig[0], b = sig[1], c = sig[2]. The delay elements and the
// always observers return to their initial values on the synchronous reset.
module regex_circuit
  import regex_pkg::*;
#(
  parameter int unsigned NODES    = 6,
  parameter int unsigned NSIG     = 3,
  parameter int unsigned NCIRC    = 1,
  parameter bit          TEMPORAL = 1'b0,
  parameter re_node_t [NODES-1:0] PROG = {
    re_input(2),    // 5: c
    re_input(1),    // 4: b
    re_alt(4, 5),   // 3: b :+: c
    re_plus(3),     // 2: Plus (b :+: c)
    re_input(0),    // 1: a
    re_seq(1, 2)    // 0: a :>: Plus (b :+: c)
  }
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NSIG-1:0]  sig,
  output logic             match,
  output logic             ok,
  output logic [NCIRC-1:0] circ_start,
  input  logic [NCIRC-1:0] circ_match
);

  // Index of the node whose sub-expression node i is, -1 for the root.
  function automatic int parent_of(input int i);
    for (int p = 0; p < int'(NODES); p++) begin
      if (PROG[p].op == RE_SEQ || PROG[p].op == RE_ALT) begin
        if (int'(PROG[p].left) == i || int'(PROG[p].right) == i) return p;
      end else if (PROG[p].op == RE_PLUS) begin
        if (int'(PROG[p].left) == i) return p;
      end
    end
    return -1;
  endfunction

  // Node that uses external port k, -1 if none does.
  function automatic int circuit_node(input int k);
    for (int p = 0; p < int'(NODES); p++) begin
      if (PROG[p].op == RE_CIRCUIT && int'(PROG[p].sig) == k) return p;
    end
    return -1;
  endfunction

  for (genvar i = 0; i < NODES; i++) begin : node
    localparam int       P = parent_of(i);
    localparam re_node_t N = PROG[i];
    localparam int       L = int'(N.left);
    localparam int       R = int'(N.right);
    localparam int       PS = (P < 0) ? 0 : P;        // safe index for the root
    localparam re_op_e   POP = PROG[PS].op;           // enclosing operator
    localparam int       PL = int'(PROG[PS].left);    // its first sub-expression

    logic st;       // start of this node
    logic mt;       // match of this node
    logic kids_ok;  // conjunction of the children's ok
    logic guard;    // kids_ok, or "kids_ok in every earlier cycle"
    logic inv;      // invariant at this node
    logic okn;      // this node's ok

    if (i != 0 && P < 0) begin : g_orphan
      $error("regex_circuit: node %0d is not reachable from the root", i);
    end

    // Start: from the enclosing operator.
    if (P < 0) begin : g_st_root
      assign st = start;
    end else if (POP == RE_SEQ && PL != i) begin : g_st_seq_right
      assign st = node[PL].mt;
    end else if (POP == RE_PLUS) begin : g_st_plus
      assign st = node[PS].st | mt;
    end else begin : g_st_inherit
      assign st = node[PS].st;
    end

    // Match: from this node's own operator.
    if (N.op == RE_INPUT) begin : g_input
      if (int'(N.sig) >= int'(NSIG)) begin : g_bad_sig
        $error("regex_circuit: node %0d reads signal %0d of %0d", i, N.sig, NSIG);
      end
      localparam int S = int'(N.sig);
      logic hit;
      assign hit = st & sig[S];
      lava_delay #(.INIT(1'b0)) u_char (.clk(clk), .rst(rst), .d(hit), .q(mt));
      assign kids_ok = 1'b1;
    end else if (N.op == RE_SEQ) begin : g_seq
      assign mt      = node[R].mt;
      assign kids_ok = node[L].okn & node[R].okn;
    end else if (N.op == RE_ALT) begin : g_alt
      assign mt      = node[L].mt | node[R].mt;
      assign kids_ok = node[L].okn & node[R].okn;
    end else if (N.op == RE_PLUS) begin : g_plus
      assign mt      = node[L].mt;
      assign kids_ok = node[L].okn;
    end else begin : g_circuit
      if (int'(N.sig) >= int'(NCIRC)) begin : g_bad_port
        $error("regex_circuit: node %0d uses port %0d of %0d", i, N.sig, NCIRC);
      end
      localparam int K = int'(N.sig);
      assign mt      = circ_match[K];
      assign kids_ok = 1'b1;
    end

    // Invariant check, plain or temporal.
    if (TEMPORAL && (N.op == RE_SEQ || N.op == RE_ALT || N.op == RE_PLUS)) begin : g_temporal
      always_obs u_always (.clk(clk), .rst(rst), .s(kids_ok), .ok(guard));
    end else begin : g_plain
      assign guard = kids_ok;
    end
    no_empty_string u_inv (.start(st), .match(mt), .ok(inv));
    assign okn = ~guard | inv;
  end

  for (genvar k = 0; k < NCIRC; k++) begin : g_port
    localparam int C = circuit_node(k);
    if (C >= 0) begin : g_used
      assign circ_start[k] = node[C].st;
    end else begin : g_unused
      assign circ_start[k] = 1'b0;
    end
  end

  assign match = node[0].mt;
  assign ok    = node[0].okn;
endmodule
