// Exhaustive test of the gate-level multiplexer: all eight input
// combinations, compared with "sel ? case1 : case0".
module lava_mux_tb;
  int checks = 0, failures = 0;
  logic sel, c0, c1, y;

  lava_mux dut (.sel(sel), .case0(c0), .case1(c1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, c1, c0} = 3'(v);
      #1;
      checks++;
      if (y !== (sel ? c1 : c0)) begin
        failures++;
        $display("mismatch sel=%b case0=%b case1=%b y=%b", sel, c0, c1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
