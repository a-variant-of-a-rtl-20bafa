// bd_cell: binary-to-decimal conversion cell (Nicoud cell).
//
// The decimal digit d (BCD, 0..9, entering from above) is doubled and the
// binary bit b (entering from the right) is added: S = 2*d + b, 0..19.
// The tens of S (0 or 1) leaves as the binary output bo (to the left) and the
// units of S leave as the BCD digit dout (below). Chains of these cells
// form the binary-to-decimal converters and the column compressors.
// The cell is written as the correction form of doubling: if d >= 5, then
// 2d + b - 10 = 2(d - 5) + b, so dout = {d - 5, b} and bo = 1; otherwise
// dout = {d, b} and bo = 0. Inputs with d > 9 are outside the cell's domain.
// The function is the architecture's; this correction form is this design's
// own. Purely combinational.
module bd_cell
  import dec_mult_pkg::*;
(
  input  bcd_t d,
  input  logic b,
  output bcd_t dout,
  output logic bo
);
  logic [2:0] base;

  always_comb begin
    bo   = (d >= 4'd5);
    base = bo ? 3'(d - 4'd5) : d[2:0];
    dout = {base, b};
  end
endmodule
