// Test of the "always" observer: ok is high after reset and in every cycle
// until one cycle after s was first low; then it stays low. Runs several
// episodes separated by resets, with s mostly high.
module always_obs_tb;
  int checks = 0, failures = 0, falls = 0;
  logic clk = 1'b0, rst, s, ok, model;

  always #5 clk = ~clk;

  always_obs dut (.clk(clk), .rst(rst), .s(s), .ok(ok));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 1'b1;
    for (int ep = 0; ep < 10; ep++) begin
      rst = 1'b1;
      @(posedge clk); #1;
      rst = 1'b0;
      model = 1'b1;
      for (int t = 0; t < 40; t++) begin
        s = ($urandom % 16) != 0;
        #1;
        checks++;
        if (ok !== model) begin
          failures++;
          $display("%0t ep %0d t %0d: ok=%b expected %b", $time, ep, t, ok, model);
        end
        if (model && !s) falls++;
        model = model & s;  // value of ok in the next cycle
        @(posedge clk); #1;
      end
    end
    if (falls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
