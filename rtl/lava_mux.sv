// Two-way multiplexer built from single gates.
// The output is case0 when sel is low and case1 when sel is high, formed as
// (case0 AND NOT sel) OR (case1 AND sel), the gate-level decomposition the
// register example uses. Purely combinational, no clock.
module lava_mux (
  input  logic sel,
  input  logic case0,
  input  logic case1,
  output logic y
);
  logic sel_n;
  assign sel_n = ~sel;
  assign y = (case0 & sel_n) | (case1 & sel);
endmodule
