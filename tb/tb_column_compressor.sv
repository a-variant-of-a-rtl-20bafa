// tb_column_compressor: exhaustive check of column_compressor: for all BCD
// digits a, b and bit ci, a + b + ci must equal 10*d1 + d0 with d0 <= 9.
module tb_column_compressor;
  import dec_mult_pkg::*;
  bcd_t a, b, d0;
  logic ci, d1;
  int checks = 0;
  int failures = 0;

  column_compressor dut (.a(a), .b(b), .ci(ci), .d0(d0), .d1(d1));

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); ci = 1'(c);
          #1;
          checks++;
          if (d0 > 4'd9 || 10 * int'(d1) + int'(d0) != i + j + c) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> d1=%0d d0=%0d", i, j, c, d1, d0);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
