// N-bit register array: N one-bit set registers sharing one set line.
// Bit i of now_out is the set register fed by bit i of new_in; all bits load
// together when set is high and hold otherwise. The array is built by
// repetition of the one-bit cell, as a recursion over a list of inputs would
// build it. The width N is a free parameter; 8 is this design's default.
module set_register_array #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         set,
  input  logic [N-1:0] new_in,
  output logic [N-1:0] now_out
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    set_register u_reg (
      .clk   (clk),
      .rst   (rst),
      .set   (set),
      .new_in(new_in[i]),
      .now   (now_out[i])
    );
  end
endmodule
