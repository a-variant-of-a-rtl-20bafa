// tb_decimal_adder: checks decimal_adder at its default width (30 digits)
// against 128-bit integer addition. Vectors: random digits, long runs of 9s
// and 8s that make a carry ripple across many positions, and random carry in.
module tb_decimal_adder;
  import dec_mult_pkg::*;
  localparam int N = 30;

  bcd_t [N-1:0] a, s;
  logic [N-1:0] e;
  logic ci, co;
  int checks = 0;
  int failures = 0;

  decimal_adder dut (.a(a), .e(e), .ci(ci), .s(s), .co(co));

  task automatic check();
    logic [127:0] va, ve, vs, got;
    #1;
    va = '0; ve = '0; got = '0;
    for (int k = N - 1; k >= 0; k--) begin
      va  = va * 10 + 128'(a[k]);
      ve  = ve * 10 + 128'(e[k]);
      got = got * 10 + 128'(s[k]);
    end
    vs = va + ve + 128'(ci);
    got = got + (co ? 128'd10 ** N : 128'd0);
    checks++;
    for (int k = 0; k < N; k++) if (s[k] > 4'd9) got = '1;
    if (got != vs) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h e=%b ci=%b -> co=%b s=%h", a, e, ci, co, s);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < N; k++) a[k] = 4'($urandom_range(0, 9));
      e = N'($urandom);
      ci = 1'($urandom);
      if (n % 3 == 0) begin
        // long propagate runs: digits 9 without a bit or 8 with a bit
        int lo, hi;
        lo = $urandom_range(0, N - 1);
        hi = $urandom_range(lo, N - 1);
        for (int k = lo; k <= hi; k++) begin
          e[k] = 1'($urandom);
          a[k] = e[k] ? 4'd8 : 4'd9;
        end
      end
      check();
    end
    for (int k = 0; k < N; k++) a[k] = 4'd9;
    e = '0; ci = 1'b1; check();
    e = '1; ci = 1'b1; check();
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
