// Exhaustive test of the noEmptyString observer: ok must be low only when
// start and match are both high.
module no_empty_string_tb;
  int checks = 0, failures = 0;
  logic start, match, ok;

  no_empty_string dut (.start(start), .match(match), .ok(ok));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {start, match} = 2'(v);
      #1;
      checks++;
      if (ok !== !(start && match)) begin
        failures++;
        $display("mismatch start=%b match=%b ok=%b", start, match, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
