// Test of the delay chain at its default length (4), at length 0 (a wire)
// and at length 7: the output must be the input of N cycles earlier, and low
// for the first N cycles after reset.
module delay_n_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, din, d4, d0, d7;
  logic [63:0] hist;  // hist[k] = din of k cycles ago (bit 0: this cycle)

  always #5 clk = ~clk;

  delay_n           dut4 (.clk(clk), .rst(rst), .din(din), .dout(d4));
  delay_n #(.N(0))  dut0 (.clk(clk), .rst(rst), .din(din), .dout(d0));
  delay_n #(.N(7))  dut7 (.clk(clk), .rst(rst), .din(din), .dout(d7));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; din = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    hist = '0;  // the chains hold zeros after reset
    for (int t = 0; t < 300; t++) begin
      din = 1'($urandom);
      hist = {hist[62:0], din};
      #1;
      check(d0, hist[0], "N=0");
      check(d4, hist[4], "N=4");
      check(d7, hist[7], "N=7");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
