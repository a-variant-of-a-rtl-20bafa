// tb_bd_cell: exhaustive check of bd_cell over its domain (d = 0..9,
// b = 0..1): 2*d + b must equal 10*bo + dout, with dout a BCD digit.
module tb_bd_cell;
  import dec_mult_pkg::*;
  bcd_t d, dout;
  logic b, bo;
  int checks = 0;
  int failures = 0;

  bd_cell dut (.d(d), .b(b), .dout(dout), .bo(bo));

  initial begin
    for (int v = 0; v < 10; v++)
      for (int c = 0; c < 2; c++) begin
        d = 4'(v); b = 1'(c);
        #1;
        checks++;
        if (dout > 4'd9 || 10 * int'(bo) + int'(dout) != 2 * v + c) begin
          failures++;
          $display("FAIL d=%0d b=%0d -> bo=%0d dout=%0d", v, c, bo, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
