// dec_mult_pkg: types and elaboration-time helpers shared by the radix-10
// combinational multiplier.
//
// bcd_t is one binary-coded-decimal digit (0..9). The helper functions are
// evaluated only at elaboration; they size the column adders and the
// binary-to-decimal converters of the multiplier.
//   col_pairs(i, n)  number of digit-bit pairs in product column i of an
//                    n x n digit partial product array: min(i+1, 2n-i).
//   bd_range(c)      the largest column height c' covered by the
//                    binary-to-decimal converter used for a column of c pairs.
//                    Converters are shared over the ranges 1, 2-3, 4-6, 7,
//                    8-12, 13-15 and 16-19, and each is sized for 10*c'.
//   bits_for(v)      number of bits needed to hold the value v.
//   digits_for(v)    number of decimal digits needed to hold the value v.
package dec_mult_pkg;

  typedef logic [3:0] bcd_t;

  function automatic int col_pairs(input int i, input int n);
    return (i + 1 < 2 * n - i) ? i + 1 : 2 * n - i;
  endfunction

  function automatic int bd_range(input int c);
    if (c <= 1) return 1;
    else if (c <= 3) return 3;
    else if (c <= 6) return 6;
    else if (c <= 7) return 7;
    else if (c <= 12) return 12;
    else if (c <= 15) return 15;
    else return 19;
  endfunction

  function automatic int bits_for(input int v);
    int b;
    b = 1;
    while ((1 << b) <= v) b++;
    return b;
  endfunction

  function automatic int digits_for(input int v);
    int d, p;
    d = 1;
    p = 10;
    while (p <= v) begin
      d++;
      p = p * 10;
    end
    return d;
  endfunction

endpackage
