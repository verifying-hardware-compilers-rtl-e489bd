// Test of the register array at its default width: random data and a random
// set line, compared bit for bit with a reference word that loads when set is
// high and holds otherwise.
module set_register_array_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, set;
  logic [N-1:0] new_in, now_out, model;

  always #5 clk = ~clk;

  set_register_array dut (.clk(clk), .rst(rst), .set(set), .new_in(new_in), .now_out(now_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; set = 1'b0; new_in = '1;
    @(posedge clk); #1;
    rst = 1'b0;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      set = ($urandom % 4) == 0;
      new_in = N'($urandom);
      #1;
      if (set) model = new_in;
      checks++;
      if (now_out !== model) begin
        failures++;
        $display("%0t set=%b new=%h now=%h expected %h", $time, set, new_in, now_out, model);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
