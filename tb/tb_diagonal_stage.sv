// tb_diagonal_stage: self-check of the half-adder chain of one diagonal.
// Three stages are tested: NIN = 10 (the widest stage of the 4 x 4 array),
// NIN = 2 (a single node) and NIN = 1 (no node). Every input pattern is
// applied; for each, the number of ones in bits_in must equal
// sum + 2 * (number of ones in carry_out), so the stage neither loses nor
// invents weight, and sum must be the parity of the inputs. It also checks
// the chain shape: carry m is set exactly when input m+1 is set and the
// inputs before it hold an odd number of ones.
module tb_diagonal_stage;
  localparam int W = 10;
  logic [W-1:0] bits_w;
  logic         sum_w;
  logic [W-2:0] cout_w;
  logic [1:0]   bits_2;
  logic         sum_2;
  logic [0:0]   cout_2;
  logic [0:0]   bits_1;
  logic         sum_1;
  logic [0:0]   cout_1;
  int checks = 0, failures = 0;

  diagonal_stage #(.NIN(W)) dut_w (.bits_in(bits_w), .sum(sum_w), .carry_out(cout_w));
  diagonal_stage #(.NIN(2)) dut_2 (.bits_in(bits_2), .sum(sum_2), .carry_out(cout_2));
  diagonal_stage #(.NIN(1)) dut_1 (.bits_in(bits_1), .sum(sum_1), .carry_out(cout_1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      int ones, parity;
      bits_w = W'(v);
      bits_2 = 2'(v);
      bits_1 = 1'(v);
      #1;
      ones = $countones(bits_w);
      check(ones == int'(sum_w) + 2 * $countones(cout_w),
            $sformatf("NIN=%0d weight bits=%b sum=%0d cout=%b", W, bits_w, sum_w, cout_w));
      check(sum_w == 1'(ones), $sformatf("NIN=%0d parity bits=%b", W, bits_w));
      parity = v & 1;
      for (int m = 1; m < W; m++) begin
        check(cout_w[m-1] == (parity == 1 && ((v >> m) & 1) == 1),
              $sformatf("NIN=%0d node %0d bits=%b cout=%b", W, m, bits_w, cout_w));
        parity ^= (v >> m) & 1;
      end
      check({cout_2, sum_2} == 2'(int'(bits_2[0]) + int'(bits_2[1])),
            $sformatf("NIN=2 bits=%b", bits_2));
      check(sum_1 == bits_1[0] && cout_1 == 1'b0, $sformatf("NIN=1 bits=%b", bits_1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
