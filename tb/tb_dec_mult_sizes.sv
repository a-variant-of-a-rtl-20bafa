// tb_dec_mult_sizes: checks that dec_mult is correct at other operand
// lengths (N = 2, 3, 5, 8, 12 and 19 digits). The column heights, column
// adder trees and converter choices all follow from N, so each size
// elaborates a different datapath. Random and all-nines operands are
// compared with 128-bit integer products.
module tb_dec_mult_sizes;
  import dec_mult_pkg::*;
  localparam int NSZ = 6;
  localparam int SIZES [NSZ] = '{2, 3, 5, 8, 12, 19};
  localparam int NMAX = 19;

  bcd_t [NMAX-1:0] x, y;
  logic strobe = 1'b0;
  int checks = 0;
  int failures = 0;

  for (genvar z = 0; z < NSZ; z++) begin : g_sz
    localparam int N = SIZES[z];
    bcd_t [2*N-1:0] p;
    dec_mult #(.N(N)) dut (.x(x[N-1:0]), .y(y[N-1:0]), .p(p));
    always @(posedge strobe) begin
      logic [127:0] vx, vy, prod;
      bit bad;
      vx = '0; vy = '0;
      for (int k = N - 1; k >= 0; k--) begin
        vx = vx * 10 + 128'(x[k]);
        vy = vy * 10 + 128'(y[k]);
      end
      prod = vx * vy;
      bad = 1'b0;
      for (int k = 0; k < 2 * N; k++) begin
        if (int'(p[k]) != int'(prod % 10)) bad = 1'b1;
        prod = prod / 10;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d x=%h y=%h p=%h", N, x[N-1:0], y[N-1:0], p);
      end
    end
  end

  task automatic apply();
    #1 strobe = 1'b1;
    #1 strobe = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < NMAX; k++) begin x[k] = 4'd9; y[k] = 4'd9; end
    apply();
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < NMAX; k++) begin
        x[k] = (n % 2 == 0) ? 4'($urandom_range(0, 9)) : 4'($urandom_range(6, 9));
        y[k] = (n % 2 == 0) ? 4'($urandom_range(0, 9)) : 4'($urandom_range(6, 9));
      end
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
