// tb_md_multiplier_sizes: the Matrix-Diagonal multiplier at other widths.
// The method is stated for any n x n; this bench builds n = 2, 3, 5, 6 and 8
// and applies every operand pair to each (65536 pairs at n = 8), comparing
// the product with the integer product one time unit after the inputs change.
module tb_md_multiplier_sizes;
  logic [1:0] x2, y2;  logic [3:0]  p2;
  logic [2:0] x3, y3;  logic [5:0]  p3;
  logic [4:0] x5, y5;  logic [9:0]  p5;
  logic [5:0] x6, y6;  logic [11:0] p6;
  logic [7:0] x8, y8;  logic [15:0] p8;
  int checks = 0, failures = 0;

  md_multiplier #(.N(2)) dut2 (.x_in(x2), .y_in(y2), .y_out(p2));
  md_multiplier #(.N(3)) dut3 (.x_in(x3), .y_in(y3), .y_out(p3));
  md_multiplier #(.N(5)) dut5 (.x_in(x5), .y_in(y5), .y_out(p5));
  md_multiplier #(.N(6)) dut6 (.x_in(x6), .y_in(y6), .y_out(p6));
  md_multiplier #(.N(8)) dut8 (.x_in(x8), .y_in(y8), .y_out(p8));

  task automatic check(input int got, input int x, input int y, input int n);
    checks++;
    if (got != x * y) begin
      failures++;
      $display("FAIL n=%0d %0d x %0d = %0d", n, x, y, got);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        x8 = 8'(x); y8 = 8'(y);
        x6 = 6'(x); y6 = 6'(y);
        x5 = 5'(x); y5 = 5'(y);
        x3 = 3'(x); y3 = 3'(y);
        x2 = 2'(x); y2 = 2'(y);
        #1;
        check(int'(p8), x, y, 8);
        if (x < 64 && y < 64) check(int'(p6), x, y, 6);
        if (x < 32 && y < 32) check(int'(p5), x, y, 5);
        if (x < 8 && y < 8)   check(int'(p3), x, y, 3);
        if (x < 4 && y < 4)   check(int'(p2), x, y, 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
