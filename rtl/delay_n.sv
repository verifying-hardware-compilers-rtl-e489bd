// Chain of N delay elements in series, each starting low.
// dout(t) = din(t-N) for t >= N and 0 before that; N = 0 gives a plain wire,
// as in the recursive definition whose base case returns the input. N is a
// static parameter; its default of 4 is this design's choice.
module delay_n #(
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout
);
  logic [N:0] tap;

  assign tap[0] = din;
  for (genvar i = 0; i < N; i++) begin : g_stage
    lava_delay #(.INIT(1'b0)) u_d (.clk(clk), .rst(rst), .d(tap[i]), .q(tap[i+1]));
  end
  assign dout = tap[N];
endmodule
