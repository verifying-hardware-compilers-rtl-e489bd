// Test of the delay element with both initial values: after reset q shows
// INIT, and afterwards q is always the d of the previous cycle. Random d for
// 200 cycles, with a second reset in the middle.
module lava_delay_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, d, q0, q1, prev;

  always #5 clk = ~clk;

  lava_delay #(.INIT(1'b0)) dut0 (.clk(clk), .rst(rst), .d(d), .q(q0));
  lava_delay #(.INIT(1'b1)) dut1 (.clk(clk), .rst(rst), .d(d), .q(q1));

  initial begin
    repeat (1000) @(posedge clk);
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
    rst = 1'b1; d = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 check(q0, 1'b0, "init low"); check(q1, 1'b1, "init high");
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      d = 1'($urandom);
      prev = d;
      rst = (t == 100);
      @(posedge clk);
      #1;
      if (t == 100) begin
        check(q0, 1'b0, "reset low"); check(q1, 1'b1, "reset high");
      end else begin
        check(q0, prev, "q0 follows d"); check(q1, prev, "q1 follows d");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
