// tb_half_adder: exhaustive check of half_adder against a + b = 2*co + s.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0;
  int failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> co=%b s=%b", a, b, co, s);
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
