// tb_cla_adder: checks cla_adder at the widths 4, 5, 6 (all input
// combinations) and 8 (random), comparing {co, sum} with a + b + ci.
module tb_cla_adder;
  int checks = 0;
  int failures = 0;
  logic [7:0] a, b;
  logic ci;
  logic strobe = 1'b0;

  for (genvar n = 4; n <= 8; n++) begin : g_w
    if (n != 7) begin : g_inst
      logic [n-1:0] sum;
      logic co;
      if (n == 4) begin : g_def
        cla_adder dut (.a(a[n-1:0]), .b(b[n-1:0]), .ci(ci), .sum(sum), .co(co));
      end else begin : g_par
        cla_adder #(.N(n)) dut (.a(a[n-1:0]), .b(b[n-1:0]), .ci(ci), .sum(sum), .co(co));
      end
      always @(posedge strobe) begin
        int expect_v;
        expect_v = int'(a[n-1:0]) + int'(b[n-1:0]) + int'(ci);
        checks++;
        if (int'({co, sum}) != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d a=%0d b=%0d ci=%0d -> %0d", n, a[n-1:0], b[n-1:0], ci, {co, sum});
        end
      end
    end
  end

  task automatic apply();
    #1 strobe = 1'b1;
    #1 strobe = 1'b0;
  endtask

  initial begin
    for (int v = 0; v < 64; v++)
      for (int w = 0; w < 64; w++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(v); b = 8'(w); ci = 1'(c);
          apply();
        end
    for (int n = 0; n < 4000; n++) begin
      a = 8'($urandom); b = 8'($urandom); ci = 1'($urandom);
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
