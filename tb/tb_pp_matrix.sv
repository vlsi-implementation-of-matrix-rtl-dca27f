// tb_pp_matrix: exhaustive self-check of the AND-node matrix at N = 4.
// For every operand pair it checks every node (i,j) against bit i of the
// multiplier times bit j of the multiplicand, and checks that the weighted
// sum of all nodes, sum of pp[i][j] * 2^(i+j), equals the integer product.
module tb_pp_matrix;
  localparam int N = 4;
  logic [N-1:0] x_in, y_in;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  pp_matrix #(.N(N)) dut (.x_in(x_in), .y_in(y_in), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << N); x++) begin
      for (int y = 0; y < (1 << N); y++) begin
        int unsigned weighted;
        x_in = N'(x);
        y_in = N'(y);
        #1;
        weighted = 0;
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N; j++) begin
            checks++;
            if (pp[i][j] != (((y >> i) & 1) == 1 && ((x >> j) & 1) == 1)) begin
              failures++;
              $display("FAIL x=%0d y=%0d node(%0d,%0d)=%0d", x, y, i, j, pp[i][j]);
            end
            if (pp[i][j]) weighted += 1 << (i + j);
          end
        end
        checks++;
        if (weighted != x * y) begin
          failures++;
          $display("FAIL x=%0d y=%0d weighted sum %0d", x, y, weighted);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
