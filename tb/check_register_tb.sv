// Test of the register observer. The observed register is correct, so its
// bit ok must stay high for any set/data sequence; the register output is
// also compared with a reference. Random stimulus, with set low on most
// cycles so that holds are exercised.
module check_register_tb;
  int checks = 0, failures = 0, holds = 0;
  logic clk = 1'b0, rst, set, new_in, current, ok, model;

  always #5 clk = ~clk;

  check_register dut (.clk(clk), .rst(rst), .set(set), .new_in(new_in), .current(current), .ok(ok));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; set = 1'b0; new_in = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    model = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      set = ($urandom % 3) == 0;
      new_in = 1'($urandom);
      #1;
      if (set) model = new_in;
      else if (new_in != model) holds++;  // a hold where new differs from the stored bit
      checks += 2;
      if (current !== model) begin
        failures++;
        $display("%0t current=%b expected %b", $time, current, model);
      end
      if (ok !== 1'b1) begin
        failures++;
        $display("%0t observer reports a violation: set=%b new=%b current=%b", $time, set, new_in, current);
      end
      @(posedge clk); #1;
    end
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
