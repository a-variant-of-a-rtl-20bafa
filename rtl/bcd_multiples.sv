// bcd_multiples: carry-free multiples 2X, 4X and 5X of an N-digit BCD
// multiplicand.
//
// Doubling and quintupling a BCD number need no carry propagation, because
// every result digit depends only on two neighbouring input digits and
// never exceeds 9:
//   (2X)_k = 2*(x_k mod 5) + [x_{k-1} >= 5]     (at most 8 + 1)
//   (5X)_k = 5*(x_k mod 2) + floor(x_{k-1} / 2) (at most 5 + 4)
// 4X is obtained by doubling 2X with the same rule. All three results have
// N+1 digits; digit N of 2X and 4X is at most 1 and 3, of 5X at most 4.
// Purely combinational, two digit-recoding levels deep for 4X.
module bcd_multiples
  import dec_mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  bcd_t [N-1:0] x,
  output bcd_t [N:0]   x2,
  output bcd_t [N:0]   x4,
  output bcd_t [N:0]   x5
);
  // one digit of the double: own digit mod 5, doubled, plus the carry
  // implied by the digit below
  function automatic bcd_t dbl_digit(input bcd_t own, input bcd_t below);
    bcd_t m;
    m = (own >= 4'd5) ? own - 4'd5 : own;
    return {m[2:0], 1'b0} + ((below >= 4'd5) ? 4'd1 : 4'd0);
  endfunction

  // one digit of the quintuple
  function automatic bcd_t quint_digit(input bcd_t own, input bcd_t below);
    return (own[0] ? 4'd5 : 4'd0) + {1'b0, below[3:1]};
  endfunction

  bcd_t [N+1:0] xe;   // x with a zero digit above and a zero digit below
  assign xe = {4'd0, x, 4'd0};

  for (genvar k = 0; k <= N; k++) begin : g_d
    assign x2[k] = dbl_digit(xe[k+1], xe[k]);
    assign x5[k] = quint_digit(xe[k+1], xe[k]);
    if (k == 0) begin : g_lo
      assign x4[k] = dbl_digit(x2[k], 4'd0);
    end else begin : g_hi
      assign x4[k] = dbl_digit(x2[k], x2[k-1]);
    end
  end
endmodule
