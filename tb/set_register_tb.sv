// Test of the one-bit set register against a reference: the output equals
// new_in while set is high (in the same cycle) and holds the last chosen
// value while set is low; it starts low after reset. Random set and data.
module set_register_tb;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;
  logic clk = 1'b0, rst, set, new_in, now, model;

  always #5 clk = ~clk;

  set_register dut (.clk(clk), .rst(rst), .set(set), .new_in(new_in), .now(now));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; set = 1'b0; new_in = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    model = 1'b0;
    for (int t = 0; t < 500; t++) begin
      set = ($urandom % 3) == 0;
      new_in = 1'($urandom);
      #1;
      if (set) begin model = new_in; loads++; end else holds++;
      checks++;
      if (now !== model) begin
        failures++;
        $display("%0t set=%b new=%b now=%b expected %b", $time, set, new_in, now, model);
      end
      @(posedge clk); #1;
    end
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
