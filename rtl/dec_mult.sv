// dec_mult: N x N digit combinational radix-10 (BCD) multiplier, N = 16.
//
// The product is formed in four combinational steps:
//  1. ppg forms N partial products, one per multiplier digit, each a row of
//     N+1 digit-bit pairs; row j is shifted by j decimal positions. Product
//     column i (i = 0..2N-1) therefore holds c = min(i+1, 2N-i) pairs.
//  2. Each column is summed on its own, in binary: column_adder reduces its
//     2c weight-1 dots and c dots each of weight 2, 4 and 8 with full and
//     half adders and a final carry-lookahead adder, and bd_converter turns
//     the binary sum (at most 10c <= 160) into up to three decimal digits.
//     Converters are shared over ranges of c, so a column uses the converter
//     sized for the top of its range.
//  3. The converter outputs, placed by decimal weight, form the major
//     partial product array: units of column i at position i, tens at i+1,
//     hundreds (0 or 1, present for c >= 10) at i+2. Each position from 1
//     up is compressed by column_compressor into a digit and a carry bit:
//     a + b + ci = 10*d1 + d0, where ci is the hundreds bit. Positions that
//     can receive a hundreds bit use it, the others tie ci to 0, so all
//     carry bits end up in one 0/1 operand.
//  4. decimal_adder adds the digit row and the 0/1 carry row. Position 0
//     (the units of column 0) and position 1 (which receives no carry bit)
//     bypass it.
//
// Steps 2 to 4 follow the column-wise binary reduction architecture; the
// recoding inside ppg and the internals of the final adder are this design's
// own, as is the choice to let positions 0 and 1 bypass the final adder.
//
// Interface: x (multiplicand) and y (multiplier) are N-digit BCD numbers,
// digit 0 least significant; p is the 2N-digit BCD product. No clock: the
// product is valid one combinational delay after the operands.
// Carries out of position 2N-1 are provably zero for BCD operands (the
// product is below 10^(2N)) and are dropped. N may range from 2 to 19, the
// tallest column the binary-to-decimal converters cover.
module dec_mult
  import dec_mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  bcd_t [N-1:0]   x,
  input  bcd_t [N-1:0]   y,
  output bcd_t [2*N-1:0] p
);
  localparam int NC = 2 * int'(N);   // product columns

  if (N < 2 || N > 19) begin : g_bad_size
    $error("dec_mult: N must be between 2 and 19");
  end

  // ------------------------------------------------ partial product array
  bcd_t [N-1:0][N:0] pd;
  logic [N-1:0][N:0] pb;

  ppg #(.N(N)) u_ppg (
    .x (x),
    .y (y),
    .pd(pd),
    .pb(pb)
  );

  // ------------------------------------------ major partial product array
  bcd_t [NC-1:0] mpp_units;   // units digit of column i at position i
  bcd_t [NC:0]   mpp_tens;    // tens digit of column i at position i+1
  logic [NC+1:0] mpp_hund;    // hundreds bit of column i at position i+2

  assign mpp_tens[0]    = 4'd0;
  assign mpp_hund[1:0]  = 2'b00;

  for (genvar i = 0; i < NC; i++) begin : g_col
    localparam int C   = col_pairs(i, int'(N));
    localparam int J0  = (i < int'(N)) ? 0 : i - int'(N);   // lowest row
    localparam int MV  = 10 * bd_range(C);
    localparam int SW  = bits_for(10 * C);
    localparam int NB  = bits_for(MV);
    localparam int ND  = digits_for(MV);

    bcd_t [C-1:0]  cd;
    logic [C-1:0]  cb;
    logic [SW-1:0] bsum;
    bcd_t [ND-1:0] dec;

    // gather the pairs of column i: row j contributes its position i-j
    for (genvar r = 0; r < C; r++) begin : g_pair
      assign cd[r] = pd[J0+r][i-J0-r];
      assign cb[r] = pb[J0+r][i-J0-r];
    end

    column_adder #(.C(C)) u_cadd (
      .digit(cd),
      .bits (cb),
      .sum  (bsum)
    );

    bd_converter #(.MAXV(MV)) u_bd (
      .bin(NB'(bsum)),
      .dec(dec)
    );

    assign mpp_units[i]  = dec[0];
    assign mpp_tens[i+1] = dec[1];
    if (C >= 10) begin : g_hund
      assign mpp_hund[i+2] = dec[2][0];
    end else begin : g_nohund
      assign mpp_hund[i+2] = 1'b0;
    end
  end

  // ------------------------------------------------------ compression
  bcd_t [NC-1:0] cmp_digit;   // d0 of the compressor at position i
  logic [NC:0]   cmp_carry;   // d1 of the compressor at position i-1

  assign cmp_digit[0]    = mpp_units[0];
  assign cmp_carry[1:0]  = 2'b00;

  for (genvar i = 1; i < NC; i++) begin : g_cmp
    column_compressor u_cmp (
      .a (mpp_units[i]),
      .b (mpp_tens[i]),
      .ci(mpp_hund[i]),
      .d0(cmp_digit[i]),
      .d1(cmp_carry[i+1])
    );
  end

  // ------------------------------------------------------ final adder
  bcd_t [NC-3:0] fin_sum;
  logic          fin_co;

  decimal_adder #(.N(NC - 2)) u_cpa (
    .a (cmp_digit[NC-1:2]),
    .e (cmp_carry[NC-1:2]),
    .ci(1'b0),
    .s (fin_sum),
    .co(fin_co)
  );

  assign p = {fin_sum, cmp_digit[1:0]};

endmodule
