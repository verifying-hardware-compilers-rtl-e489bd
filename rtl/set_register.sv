// One-bit register with a load enable ("set register").
// A gate-level multiplexer chooses between the stored bit (set low) and the
// new bit (set high); the chosen bit is the output "now" and is stored in a
// delay element that starts low. The output is therefore combinational in
// set and new_in: while set is high, now equals new_in in the same cycle, and
// while set is low, now holds the last value chosen.
// Timing: now(t) = set(t) ? new_in(t) : now(t-1), with now(-1) = 0.
module set_register (
  input  logic clk,
  input  logic rst,
  input  logic set,
  input  logic new_in,
  output logic now
);
  logic old;

  lava_mux u_mux (.sel(set), .case0(old), .case1(new_in), .y(now));
  lava_delay #(.INIT(1'b0)) u_state (.clk(clk), .rst(rst), .d(now), .q(old));
endmodule
