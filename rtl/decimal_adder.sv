// decimal_adder: carry-propagate adder of an N-digit BCD number and an
// N-digit number whose digits are 0 or 1 (the final adder of the
// multiplier).
//
// Because one operand digit is only 0 or 1, each position's sum t = a + e is
// at most 10. A position generates a decimal carry when t = 10 and
// propagates one when t = 9. The carries into all positions are formed by a
// parallel-prefix (Kogge-Stone) network over these generate/propagate pairs,
// and each result digit is (t + carry) mod 10, computed without a second
// full decimal addition: a position that receives a carry and had t = 9
// gives 0, otherwise t + carry (t = 10 without a carry gives 0 as well).
//
// Keeping one operand to 0/1 digits is what makes this adder simple; the
// prefix network itself is this design's own choice.
//
// Interface: a (BCD) and e (one bit per digit) are N digits, ci is the carry
// into digit 0; s is the N-digit BCD sum and co the carry out of the top
// digit. Purely combinational.
module decimal_adder
  import dec_mult_pkg::*;
#(
  parameter int unsigned N = 30
) (
  input  bcd_t [N-1:0] a,
  input  logic [N-1:0] e,
  input  logic         ci,
  output bcd_t [N-1:0] s,
  output logic         co
);
  localparam int LV = $clog2(N) + 1;   // prefix levels, level 0 = inputs

  logic [N-1:0] gen, prop;
  logic [N-1:0] gp [LV+1];   // group generate after each level
  logic [N-1:0] pp [LV+1];   // group propagate after each level
  logic [N:0]   c;           // carry into each digit

  for (genvar k = 0; k < N; k++) begin : g_gp
    assign gen[k]  = (a[k] == 4'd9) &  e[k];
    assign prop[k] = ((a[k] == 4'd9) & ~e[k]) | ((a[k] == 4'd8) & e[k]);
  end

  assign gp[0] = gen;
  assign pp[0] = prop;

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar k = 0; k < N; k++) begin : g_pos
      if (k >= (1 << l)) begin : g_comb
        assign gp[l+1][k] = gp[l][k] | (pp[l][k] & gp[l][k-(1<<l)]);
        assign pp[l+1][k] = pp[l][k] & pp[l][k-(1<<l)];
      end else begin : g_keep
        assign gp[l+1][k] = gp[l][k];
        assign pp[l+1][k] = pp[l][k];
      end
    end
  end

  assign c[0] = ci;
  for (genvar k = 0; k < N; k++) begin : g_carry
    assign c[k+1] = gp[LV][k] | (pp[LV][k] & ci);
  end

  for (genvar k = 0; k < N; k++) begin : g_sum
    logic [3:0] t;
    assign t = a[k] + 4'(e[k]);
    always_comb begin
      if (t == 4'd10)                 s[k] = c[k] ? 4'd1 : 4'd0;
      else if (t == 4'd9 && c[k])     s[k] = 4'd0;
      else                            s[k] = t + 4'(c[k]);
    end
  end

  assign co = c[N];
endmodule
