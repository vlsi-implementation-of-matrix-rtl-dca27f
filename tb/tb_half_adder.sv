// tb_half_adder: exhaustive self-check of the half-adder summing node.
// Applies all four input pairs and compares s and c with the two bits of the
// integer sum a + b. A watchdog ends the run with a failure if it hangs.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int unsigned total;
      {a, b} = 2'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if ({c, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> c=%0d s=%0d", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
