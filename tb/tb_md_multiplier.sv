// tb_md_multiplier: end-to-end self-check of the Matrix-Diagonal multiplier
// at its default size (4 x 4, no parameter override).
// It first applies the worked example of the method, 1010 x 1101 = 10000010
// (10 x 13 = 130), then all 256 operand pairs, comparing y_out with the
// integer product. The multiplier has no clock: each pair is applied and the
// product must be correct after one time unit, with no clock edge in between.
// It also counts how often the two mechanisms of the array are exercised,
// judged from the operands alone: a diagonal whose AND outputs hold two or
// more ones (so a carry is stacked into the next diagonal), and a product
// whose top bit is set (that diagonal has no AND node, so it is built only
// from stacked carries). A mechanism never seen counts as a failure.
module tb_md_multiplier;
  import md_pkg::*;
  localparam int N = 4;
  logic [N-1:0]   x_in, y_in;
  logic [2*N-1:0] y_out;
  int checks = 0, failures = 0;
  int n_carry_stacked = 0, n_top_from_carries = 0;

  md_multiplier dut (.x_in(x_in), .y_in(y_in), .y_out(y_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y);
    int expected;
    bit stacked;
    x_in = N'(x);
    y_in = N'(y);
    #1;
    expected = x * y;
    checks++;
    if (y_out != (2*N)'(expected)) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, expected %0d", x, y, y_out, expected);
    end
    // Independent view of the array: ones on each diagonal i + j == k.
    stacked = 0;
    for (int k = 0; k <= 2 * N - 2; k++) begin
      int ones = 0;
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N && ((y >> i) & 1) == 1 && ((x >> (k - i)) & 1) == 1)
          ones++;
      if (ones >= 2) stacked = 1;
    end
    if (stacked) n_carry_stacked++;
    if (((expected >> (2 * N - 1)) & 1) == 1) n_top_from_carries++;
  endtask

  initial begin
    // Worked example: 1010 x 1101.
    apply(10, 13);
    checks++;
    if (y_out != 8'b1000_0010) begin
      failures++;
      $display("FAIL worked example gives %b", y_out);
    end
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++)
        apply(x, y);

    checks++;
    if (n_carry_stacked == 0) begin
      failures++;
      $display("FAIL no carry was ever stacked into a next diagonal");
    end
    checks++;
    if (n_top_from_carries == 0) begin
      failures++;
      $display("FAIL top product bit never built from stacked carries");
    end
    $display("half adders in a %0dx%0d array: %0d", N, N, ha_count(N));
    $display("mechanisms: carry stacked %0d, top bit from carries %0d",
             n_carry_stacked, n_top_from_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
