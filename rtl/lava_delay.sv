// One-cycle delay element with a fixed initial value.
// q follows d one clock later. The synchronous reset puts the element back to
// INIT, which stands for the initial value a delay component starts with
// (low for the register examples, high for the "always" observer). Reset is
// this design's choice: the delay component itself only has an initial value.
module lava_delay #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (rst) q <= INIT;
    else     q <= d;
  end
endmodule
