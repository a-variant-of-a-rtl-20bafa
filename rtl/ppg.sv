// ppg: multiplicand precomputation and partial product generation.
//
// Each multiplier digit y_j is recoded into two multiples of the
// multiplicand X whose sum is y_j * X, one taken from {0, X, 4X, 5X} and
// one from {0, 2X, 4X}:
//   y : 0    1    2     3      4     5     6      7      8      9
//   A : 0    X    0     X      0     5X    4X     5X     4X     5X
//   B : 0    0    2X    2X     4X    0     2X     2X     4X     4X
// The multiples come carry-free from bcd_multiples, so the only arithmetic
// per partial product is one digit-wise addition t_k = A_k + B_k (at most
// 18) with no carry propagation: the digit t_k mod 10 stays in position k
// and the carry [t_k >= 10] becomes the single bit of position k+1. Each
// partial product is therefore a row of N+1 digit-bit pairs, every pair
// worth at most 10 (the bit of position 0 is always 0, and no carry leaves
// position N because A_N <= 4 and B_N <= 3).
//
// The architecture only requires that the multiplier be recoded so that
// just a few easy multiples of X are needed and that each partial product
// be a row of digit-bit pairs; this particular recoding is this design's
// own choice. It needs no negative multiples and so no sign handling.
//
// Interface: x and y are N-digit BCD numbers. Row j (weight 10^j) is
// pd[j][k] (digit) and pb[j][k] (bit), k = 0..N, with value y_j * X.
// Purely combinational.
module ppg
  import dec_mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  bcd_t [N-1:0]        x,
  input  bcd_t [N-1:0]        y,
  output bcd_t [N-1:0][N:0]   pd,
  output logic [N-1:0][N:0]   pb
);
  bcd_t [N:0] x1, x2, x4, x5;

  assign x1 = {4'd0, x};

  bcd_multiples #(.N(N)) u_mult (
    .x (x),
    .x2(x2),
    .x4(x4),
    .x5(x5)
  );

  for (genvar j = 0; j < N; j++) begin : g_row
    bcd_t [N:0] ma, mb;
    logic [N+1:0] cy;

    // multiple selection (recoding of y_j)
    always_comb begin
      unique case (y[j])
        4'd1:    begin ma = x1; mb = '0; end
        4'd2:    begin ma = '0; mb = x2; end
        4'd3:    begin ma = x1; mb = x2; end
        4'd4:    begin ma = '0; mb = x4; end
        4'd5:    begin ma = x5; mb = '0; end
        4'd6:    begin ma = x4; mb = x2; end
        4'd7:    begin ma = x5; mb = x2; end
        4'd8:    begin ma = x4; mb = x4; end
        4'd9:    begin ma = x5; mb = x4; end
        default: begin ma = '0; mb = '0; end
      endcase
    end

    assign cy[0] = 1'b0;
    for (genvar k = 0; k <= N; k++) begin : g_pos
      logic [4:0] t;
      assign t        = 5'(ma[k]) + 5'(mb[k]);
      assign cy[k+1]  = (t >= 5'd10);
      assign pd[j][k] = cy[k+1] ? 4'(t - 5'd10) : t[3:0];
      assign pb[j][k] = cy[k];
    end
  end
endmodule
