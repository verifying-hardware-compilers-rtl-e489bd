// "Always" observer: remembers whether a signal has been high in every cycle
// so far. ok is a delay element that starts high and is fed with (s AND ok),
// so ok(t) is the AND of s over cycles 0 .. t-1 (ok is high in cycle 0).
// Once s has been low for one cycle, ok stays low until reset.
module always_obs (
  input  logic clk,
  input  logic rst,
  input  logic s,
  output logic ok
);
  logic hold;

  assign hold = s & ok;
  lava_delay #(.INIT(1'b1)) u_state (.clk(clk), .rst(rst), .d(hold), .q(ok));
endmodule
