// tb_ppg: checks ppg at its default size (16 digits). For random and corner
// operands every partial product row j must be worth y_j * X, computed here
// with integer arithmetic, every digit must be a BCD digit, and every
// digit-bit pair must be worth at most 10.
module tb_ppg;
  import dec_mult_pkg::*;
  localparam int N = 16;

  bcd_t [N-1:0] x, y;
  bcd_t [N-1:0][N:0] pd;
  logic [N-1:0][N:0] pb;
  int checks = 0;
  int failures = 0;

  ppg dut (.x(x), .y(y), .pd(pd), .pb(pb));

  task automatic check();
    logic [127:0] vx, row, want;
    bit bad;
    #1;
    vx = '0;
    for (int k = N - 1; k >= 0; k--) vx = vx * 10 + 128'(x[k]);
    for (int j = 0; j < N; j++) begin
      row = '0;
      bad = 1'b0;
      for (int k = N; k >= 0; k--) begin
        row = row * 10 + 128'(pd[j][k]) + 128'(pb[j][k]);
        if (pd[j][k] > 4'd9) bad = 1'b1;
      end
      want = vx * 128'(y[j]);
      checks++;
      if (bad || row != want) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d x=%h y_j=%0d", j, x, y[j]);
      end
    end
  endtask

  initial begin
    x = '0; y = '0; check();
    for (int k = 0; k < N; k++) begin x[k] = 4'd9; y[k] = 4'(k % 10); end
    check();
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < N; k++) begin
        x[k] = 4'($urandom_range(0, 9));
        y[k] = 4'($urandom_range(0, 9));
      end
      check();
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
