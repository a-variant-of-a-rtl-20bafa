// tb_dec_mult: end-to-end self-checking testbench for the 16 x 16 digit
// BCD multiplier at its default size.
//
// Operands are converted to binary here, multiplied with 128-bit integer
// arithmetic and the product converted back to BCD; every product digit of
// the design is compared with it. Vectors: corner cases (zero, one, all
// nines, powers of ten), uniformly random digits and random digits biased
// towards 9. The testbench also counts how often the mechanisms of the
// datapath are exercised, and fails if one never is:
//   - every multiplier digit value 0..9 (each recoding case of the PPG),
//   - a column sum of 100 or more (hundreds bit into a 3-to-2 compressor),
//   - a compressor producing a carry bit,
//   - a decimal carry propagating through a digit 9 of the final adder.
module tb_dec_mult;
  import dec_mult_pkg::*;

  localparam int N = 16;
  localparam int NRAND = 20000;

  bcd_t [N-1:0]   x, y;
  bcd_t [2*N-1:0] p;

  int checks = 0;
  int failures = 0;
  int n_ydig [10];
  int n_hund = 0;
  int n_cmp_carry = 0;
  int n_propagate = 0;

  dec_mult dut (.x(x), .y(y), .p(p));

  function automatic logic [127:0] to_bin(input bcd_t [N-1:0] v);
    logic [127:0] r;
    r = '0;
    for (int k = N - 1; k >= 0; k--) r = r * 10 + 128'(v[k]);
    return r;
  endfunction

  task automatic check();
    logic [127:0] prod;
    bcd_t [2*N-1:0] expect_p;
    #1;
    prod = to_bin(x) * to_bin(y);
    for (int k = 0; k < 2 * N; k++) begin
      expect_p[k] = 4'(prod % 10);
      prod = prod / 10;
    end
    checks++;
    if (p !== expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h p=%h expected=%h", x, y, p, expect_p);
    end
    for (int k = 0; k < N; k++) n_ydig[y[k]]++;
    if (dut.mpp_hund != '0) n_hund++;
    if (dut.cmp_carry != '0) n_cmp_carry++;
    if ((dut.u_cpa.c[2*N-2:1] & dut.u_cpa.prop) != '0) n_propagate++;
  endtask

  task automatic rand_operands(input bit high);
    for (int k = 0; k < N; k++) begin
      x[k] = high ? 4'($urandom_range(7, 9)) : 4'($urandom_range(0, 9));
      y[k] = high ? 4'($urandom_range(7, 9)) : 4'($urandom_range(0, 9));
    end
  endtask

  initial begin
    for (int d = 0; d < 10; d++) n_ydig[d] = 0;
    x = '0; y = '0; check();
    for (int k = 0; k < N; k++) begin x[k] = 4'd9; y[k] = 4'd9; end
    check();
    x = '0; x[0] = 4'd1; check();
    for (int a = 0; a < N; a++) begin
      for (int b = 0; b < N; b++) begin
        x = '0; y = '0; x[a] = 4'd1; y[b] = 4'd9; check();
      end
    end
    for (int d = 0; d < 10; d++) begin
      for (int k = 0; k < N; k++) begin x[k] = 4'd9; y[k] = 4'(d); end
      check();
    end
    for (int n = 0; n < NRAND; n++) begin
      rand_operands(n % 3 == 0);
      check();
    end
    for (int d = 0; d < 10; d++)
      if (n_ydig[d] == 0) begin
        failures++;
        $display("multiplier digit %0d never applied", d);
      end
    if (n_hund == 0)      begin failures++; $display("no column sum reached 100"); end
    if (n_cmp_carry == 0) begin failures++; $display("no compressor carry"); end
    if (n_propagate == 0) begin failures++; $display("no carry propagation in the final adder"); end
    $display("mechanisms: hundreds=%0d compressor_carry=%0d final_propagate=%0d",
             n_hund, n_cmp_carry, n_propagate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
