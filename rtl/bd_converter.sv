// bd_converter: binary-to-decimal converter built as an array of bd_cell.
//
// The binary input is consumed most significant bit first. A row of decimal
// digits holds the decimal value of the bits read so far; each further bit
// doubles that value and adds the bit, which is exactly one bd_cell per
// decimal digit: the units cell takes the new bit from the right and passes
// its carry to the tens cell of the same step, and so on. A cell is placed
// only where the digit it doubles can reach 5 for some input up to MAXV;
// everywhere else doubling cannot produce a carry and the step is plain
// wiring. The first few bits therefore form the top digit directly (3 or 4
// bits, value at most 9), as in a classic Nicoud array, and the number of
// cells follows from MAXV alone: for MAXV = 10, 30, 60, 70, 120, 150 and 190
// it places 1, 2, 3, 3, 5, 5 and 6 cells.
//
// Interface: bin is NB = bits_for(MAXV) bits wide, dec holds ND =
// digits_for(MAXV) BCD digits, dec[0] the units. Inputs above MAXV are outside
// the converter's range. Purely combinational.
module bd_converter
  import dec_mult_pkg::*;
#(
  parameter int unsigned MAXV = 160,
  localparam int unsigned NB = bits_for(MAXV),
  localparam int unsigned ND = digits_for(MAXV)
) (
  input  logic [NB-1:0] bin,
  output bcd_t [ND-1:0] dec
);

  // Largest value decimal digit k can hold before step s, over all inputs
  // up to MAXV: the prefix read so far is at most MAXV >> (NB - s).
  function automatic int max_digit(input int s, input int k);
    int m, scale;
    m = int'(MAXV) >> (int'(NB) - s);
    scale = 1;
    for (int i = 0; i < k; i++) scale = scale * 10;
    if (m >= 10 * scale) return 9;
    return m / scale;
  endfunction

  for (genvar s = 0; s < NB; s++) begin : g_step
    bcd_t din  [ND];    // digit row before this step
    bcd_t dout [ND];    // digit row after this step
    logic cy   [ND+1];  // binary carries entering each digit

    for (genvar k = 0; k < ND; k++) begin : g_in
      if (s == 0) begin : g_zero
        assign din[k] = 4'd0;
      end else begin : g_prev
        assign din[k] = g_step[s-1].dout[k];
      end
    end

    assign cy[0] = bin[NB-1-s];

    for (genvar k = 0; k < ND; k++) begin : g_digit
      if (max_digit(s, k) >= 5) begin : g_cell
        bd_cell u_cell (
          .d   (din[k]),
          .b   (cy[k]),
          .dout(dout[k]),
          .bo  (cy[k+1])
        );
      end else begin : g_wire
        // digit at most 4: doubling is a left shift with no carry
        assign dout[k]  = {din[k][2:0], cy[k]};
        assign cy[k+1]  = 1'b0;
      end
    end
  end

  for (genvar k = 0; k < ND; k++) begin : g_out
    assign dec[k] = g_step[NB-1].dout[k];
  end

endmodule
