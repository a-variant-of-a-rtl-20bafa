// column_adder: binary multi-operand adder for one column of the partial
// product array.
//
// A column holds C digit-bit pairs of equal decimal weight: C BCD digits and
// C single bits. Seen as binary dots, that is 2C dots of weight 1 (every digit
// bit 0 and every single bit) and C dots each of weights 2, 4 and 8. The
// column value, at most 10*C, is produced as an unsigned binary number.
//
// The dots are reduced in carry-save stages of full adders. In each stage the
// dot count of every binary column is divided by three: the quotient gives
// the number of full adders (their sums stay in the column, their carries
// go one column up) and the remainder (0, 1 or 2 dots) passes unchanged to
// the next stage. In the same stage, the lowest column that still holds two
// dots gets a half adder, provided its carry does not make the next stage
// taller: its sum is then a finished result bit, so every stage peels off
// one more low-order bit at no cost in stages. Once no column holds more than
// three dots, one last stage is built from the least significant column up:
// a column of three gets a full adder; a column of two gets a half adder if
// it receives a carry from below or is the lowest two-dot column; any other
// column passes its dots on. Every column then holds at most two dots.
// The low columns with a single dot are result bits. From the lowest two-dot
// column up to the highest occupied one a carry-lookahead adder (cla_adder)
// adds the two rows; the second dot of the lowest column enters as the
// adder's carry in, and the adder's carry out is the next result bit. For
// C = 1..16 the final adder is 4 or 5 bits wide.
//
// The shape of the tree is computed at elaboration from C alone (function
// sim), so one description covers every column height. It follows the
// reduction rules of the dot-notation method rather than copying any
// hand-optimised scheme adder by adder; where to place the optional half
// adders is this design's own rule.
//
// Interface: digit[k] and bits[k], k < C, are the pairs; sum is SW =
// bits_for(10*C) bits. Purely combinational. The top tracked column is
// always zero for inputs within range and is left unused.
module column_adder
  import dec_mult_pkg::*;
#(
  parameter int unsigned C = 16,
  localparam int unsigned SW = bits_for(10 * C),
  localparam int unsigned W  = SW + 1,          // binary columns tracked
  localparam int unsigned MH = 2 * C + 2        // largest column height
) (
  input  bcd_t [C-1:0] digit,
  input  logic [C-1:0] bits,
  output logic [SW-1:0] sum
);

  localparam int HMAX_W = 16;   // bound for the elaboration-time arrays

  // dot count of binary column w before any stage
  function automatic int init_h(input int w);
    if (w == 0) return 2 * int'(C);
    if (w <= 3) return int'(C);
    return 0;
  endfunction

  // Elaboration-time model of the tree, stage by stage. sim(s, w, what):
  //   what = 0: dot count of column w at the input of stage s
  //   what = 1: tallest column at the input of stage s
  //   what = 2: column that gets a half adder in divide-by-three stage s,
  //             or -1
  //   what = 3: lowest column holding two or more dots at stage s (W if none)
  function automatic int sim(input int s, input int w, input int what);
    int h  [HMAX_W];
    int hn [HMAX_W];
    int mx, mxn, cin, lo, ha;
    bit add;
    for (int j = 0; j < HMAX_W; j++) h[j] = (j < int'(W)) ? init_h(j) : 0;
    for (int st = 0; st <= s; st++) begin
      mx = 0;
      for (int j = 0; j < int'(W); j++) if (h[j] > mx) mx = h[j];
      lo = int'(W);
      for (int j = int'(W) - 1; j >= 0; j--) if (h[j] >= 2) lo = j;
      ha = -1;
      if (mx > 3) begin
        for (int j = 0; j < int'(W); j++)
          hn[j] = h[j] / 3 + h[j] % 3 + ((j > 0) ? h[j-1] / 3 : 0);
        // a half adder on the lowest two-dot column leaves a single
        // result bit, if its carry does not make the next stage taller
        if (lo < int'(W) - 1 && h[lo] == 2) begin
          mxn = 0;
          for (int j = 0; j < int'(W); j++) if (hn[j] > mxn) mxn = hn[j];
          if (hn[lo+1] + 1 <= mxn) begin
            hn[lo]   = hn[lo] - 1;
            hn[lo+1] = hn[lo+1] + 1;
            ha       = lo;
          end
        end
      end else begin
        cin = 0;
        for (int j = 0; j < int'(W); j++) begin
          add   = (h[j] == 3) || (h[j] == 2 && (cin == 1 || j == lo));
          hn[j] = add ? 1 + cin : h[j] + cin;
          cin   = add ? 1 : 0;
        end
      end
      if (st == s) begin
        case (what)
          0:       return h[w];
          1:       return mx;
          2:       return ha;
          default: return lo;
        endcase
      end
      for (int j = 0; j < int'(W); j++) h[j] = hn[j];
    end
    return 0;
  endfunction

  function automatic int ht(input int s, input int w);
    return sim(s, w, 0);
  endfunction

  // number of stages until every column holds at most two dots
  function automatic int n_stages();
    int s;
    s = 0;
    while (sim(s, 0, 1) > 2) s++;
    return s;
  endfunction

  // in the last stage: does column w receive a carry from column w-1?
  function automatic int last_cin(input int s, input int w);
    int cin, lo;
    bit add;
    cin = 0;
    lo  = sim(s, 0, 3);
    for (int j = 0; j < w; j++) begin
      add = (ht(s, j) == 3) || (ht(s, j) == 2 && (cin == 1 || j == lo));
      cin = add ? 1 : 0;
    end
    return cin;
  endfunction

  // highest column holding a dot at stage s
  function automatic int top_col(input int s);
    int t;
    t = 0;
    for (int j = 0; j < int'(W); j++) if (ht(s, j) > 0) t = j;
    return t;
  endfunction

  localparam int NS  = n_stages();
  localparam int LW  = sim(NS, 0, 3);              // lowest two-dot column
  localparam int L   = (LW < int'(W)) ? LW : 0;    // start of the final adder
  localparam int TOP = top_col(NS);
  localparam int AW  = TOP - L + 1;                // width of the final adder

  // ---------------------------------------------------------------- stages
  for (genvar s = 0; s <= NS; s++) begin : g_stage
    logic [MH-1:0] col [W];   // dots entering stage s (s = NS: final rows)

    if (s == 0) begin : g_src
      for (genvar w = 0; w < W; w++) begin : g_col
        for (genvar k = 0; k < C; k++) begin : g_pair
          if (w <= 3) begin : g_dig
            assign col[w][k] = digit[k][w];
          end else begin : g_none
            assign col[w][k] = 1'b0;
          end
          if (w == 0) begin : g_bit
            assign col[w][C+k] = bits[k];
          end else begin : g_nobit
            assign col[w][C+k] = 1'b0;
          end
        end
        assign col[w][MH-1:2*C] = '0;
      end
    end else begin : g_link
      for (genvar w = 0; w < W; w++) begin : g_col
        assign col[w] = g_stage[s-1].g_work.nxt[w];
      end
    end

    if (s < NS) begin : g_work
      logic [MH-1:0] nxt [W];   // dots leaving stage s
      logic [MH-1:0] cr  [W];   // carries produced by the adders of stage s
      for (genvar w = 0; w < W; w++) begin : g_col
        localparam int H  = ht(s, w);
        if (sim(s, 0, 1) > 3) begin : g_reduce
          localparam int Q  = H / 3;
          localparam int R  = H % 3;
          localparam int QL = (w > 0) ? ht(s, w - 1) / 3 : 0;
          localparam int HA = sim(s, 0, 2);
          localparam int EX = (HA >= 0 && w == HA + 1) ? 1 : 0;
          if (w == HA) begin : g_ha
            // lowest two-dot column: its sum is a final result bit
            half_adder u_ha (
              .a (col[w][0]),
              .b (col[w][1]),
              .s (nxt[w][0]),
              .co(cr[w][0])
            );
            assign nxt[w][MH-1:1] = '0;
            assign cr[w][MH-1:1]  = '0;
          end else begin : g_fas
            for (genvar f = 0; f < Q; f++) begin : g_fa
              full_adder u_fa (
                .a (col[w][3*f]),
                .b (col[w][3*f+1]),
                .ci(col[w][3*f+2]),
                .s (nxt[w][f]),
                .co(cr[w][f])
              );
            end
            for (genvar r = 0; r < R; r++) begin : g_pass
              assign nxt[w][Q+r] = col[w][3*Q+r];
            end
            for (genvar f = 0; f < QL; f++) begin : g_cin
              assign nxt[w][Q+R+f] = cr[w-1][f];
            end
            if (EX == 1) begin : g_hacin
              assign nxt[w][Q+R+QL] = cr[w-1][0];
            end
            if (Q + R + QL + EX < MH) begin : g_pad
              assign nxt[w][MH-1:Q+R+QL+EX] = '0;
            end
            if (Q < MH) begin : g_crpad
              assign cr[w][MH-1:Q] = '0;
            end
          end
        end else begin : g_last
          localparam int CI = last_cin(s, w);
          localparam int LO = sim(s, 0, 3);
          localparam int HN = ((H == 3) || (H == 2 && (CI == 1 || w == LO))) ? 1 : H;
          if (H == 3) begin : g_fa
            full_adder u_fa (
              .a (col[w][0]),
              .b (col[w][1]),
              .ci(col[w][2]),
              .s (nxt[w][0]),
              .co(cr[w][0])
            );
          end else if (H == 2 && (CI == 1 || w == LO)) begin : g_ha
            half_adder u_ha (
              .a (col[w][0]),
              .b (col[w][1]),
              .s (nxt[w][0]),
              .co(cr[w][0])
            );
          end else begin : g_pass
            for (genvar r = 0; r < H; r++) begin : g_bit
              assign nxt[w][r] = col[w][r];
            end
            assign cr[w][0] = 1'b0;
          end
          if (CI == 1) begin : g_cin
            assign nxt[w][HN] = cr[w-1][0];
          end
          if (HN + CI < MH) begin : g_pad
            assign nxt[w][MH-1:HN+CI] = '0;
          end
          assign cr[w][MH-1:1] = '0;
        end
      end
    end
  end

  // ------------------------------------------------------------ final add
  logic [W-1:0]  row_a, row_b, total;
  logic [AW-1:0] add_sum;
  logic          add_co;

  for (genvar w = 0; w < W; w++) begin : g_rows
    assign row_a[w] = g_stage[NS].col[w][0];
    if (w == L) begin : g_cin
      assign row_b[w] = 1'b0;   // this dot enters as the adder's carry in
    end else begin : g_dot
      assign row_b[w] = g_stage[NS].col[w][1];
    end
  end

  cla_adder #(.N(AW)) u_cpa (
    .a  (row_a[TOP:L]),
    .b  (row_b[TOP:L]),
    .ci (g_stage[NS].col[L][1]),
    .sum(add_sum),
    .co (add_co)
  );

  // result: single low bits, adder sum, adder carry out, zeros above
  always_comb begin
    total = '0;
    for (int w = 0; w < L; w++) total[w] = row_a[w];
    total[TOP:L] = add_sum;
    total[TOP+1] = add_co;
  end

  assign sum = total[SW-1:0];

endmodule
