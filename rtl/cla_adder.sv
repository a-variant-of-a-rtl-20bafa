// cla_adder: N-bit binary carry-lookahead adder with carry in.
//
// Every bit position forms generate g = a & b and propagate p = a ^ b. The
// carry into each position is computed directly (single-level lookahead) as
// the OR over all lower positions j of g[j] AND the propagates between j and
// the position, plus the carry in when every lower position propagates. No
// carry ripples from cell to cell. The lookahead organisation is this
// design's own choice; the architecture only asks for a fast carry-lookahead
// adder. The multiplier uses widths 4 and 5. sum is N bits and co the carry
// out. Purely combinational.
module cla_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] sum,
  output logic         co
);
  logic [N-1:0] g, p;
  logic [N:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      logic term;
      logic chain;
      term  = 1'b0;
      chain = 1'b1;
      // walk down from position i-1 to 0, accumulating the propagate chain
      for (int j = i - 1; j >= 0; j--) begin
        term  = term | (chain & g[j]);
        chain = chain & p[j];
      end
      c[i] = term | (chain & ci);
    end
  end

  assign sum = p ^ c[N-1:0];
  assign co  = c[N];
endmodule
