// Synchronous observer for the one-bit set register.
// It instantiates the register, reads its inputs and output, and drives a
// single bit ok that must stay high: whenever set is low, the register's
// output must equal its value of the previous cycle (the stored value does not
// change). The previous value is kept in a delay element that starts low, the
// same initial value as the register's own state.
// current is brought out so that the register under observation can be used.
module check_register (
  input  logic clk,
  input  logic rst,
  input  logic set,
  input  logic new_in,
  output logic current,
  output logic ok
);
  logic previous;

  set_register u_reg (.clk(clk), .rst(rst), .set(set), .new_in(new_in), .now(current));
  lava_delay #(.INIT(1'b0)) u_prev (.clk(clk), .rst(rst), .d(current), .q(previous));

  // ok = NOT set ==> (current <==> previous)
  assign ok = set | ~(current ^ previous);
endmodule
