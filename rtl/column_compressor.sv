// column_compressor: decimal carry-save adder for one column of the major
// partial product array.
//
// Two BCD digits a and b and one single bit ci (the hundreds digit of a
// column sum, 0 or 1) are added by a 4-bit carry-lookahead adder with ci on
// its carry input. The 5-bit binary result (0..19) is converted by one
// bd_cell: its upper four bits form the cell's digit input (at most 9) and
// its lowest bit the cell's binary input, so the cell computes 2*(sum>>1) +
// (sum&1) = sum. The cell's digit output d0 keeps the decimal weight of the
// inputs; its binary output d1 carries into the next decimal column.
// a + b + ci = 10*d1 + d0. With ci tied to 0 the same circuit is the
// two-digit compressor. Purely combinational.
module column_compressor
  import dec_mult_pkg::*;
(
  input  bcd_t a,
  input  bcd_t b,
  input  logic ci,
  output bcd_t d0,
  output logic d1
);
  logic [3:0] s;
  logic       co;

  cla_adder #(.N(4)) u_cla (
    .a  (a),
    .b  (b),
    .ci (ci),
    .sum(s),
    .co (co)
  );

  bd_cell u_bd (
    .d   ({co, s[3:1]}),
    .b   (s[0]),
    .dout(d0),
    .bo  (d1)
  );
endmodule
