// tb_column_adder: self-checking testbench for column_adder.
// One instance per column height C = 1..16 shares the same random digit-bit
// pairs (each uses the first C of them). After every input change the binary
// sum of each instance is compared with the column value computed here by
// plain integer addition. Corner vectors: all zero, all pairs at 9+1.
// The width of each instance's final carry-lookahead adder is also checked
// against the widths the reduction rules give (4 or 5 bits).
module tb_column_adder;
  import dec_mult_pkg::*;

  localparam int NMAX = 16;
  localparam int NRAND = 3000;

  bcd_t [NMAX-1:0] dg;
  logic [NMAX-1:0] bt;
  logic strobe = 1'b0;
  int checks = 0;
  int failures = 0;

  localparam int ADDER_W [1:NMAX] = '{4, 4, 4, 5, 4, 4, 4, 5, 5, 4, 4, 4, 5, 4, 5, 5};

  for (genvar c = 1; c <= NMAX; c++) begin : g_c
    initial begin
      checks++;
      if (dut.AW != ADDER_W[c]) begin
        failures++;
        $display("FAIL C=%0d final adder width %0d, expected %0d", c, dut.AW, ADDER_W[c]);
      end
    end
    logic [bits_for(10*c)-1:0] sum;
    column_adder #(.C(c)) dut (.digit(dg[c-1:0]), .bits(bt[c-1:0]), .sum(sum));
    always @(posedge strobe) begin
      int expect_v;
      expect_v = 0;
      for (int k = 0; k < c; k++) expect_v += int'(dg[k]) + int'(bt[k]);
      checks++;
      if (int'(sum) != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL C=%0d sum=%0d expected=%0d", c, sum, expect_v);
      end
    end
  end

  task automatic apply();
    #1 strobe = 1'b1;
    #1 strobe = 1'b0;
  endtask

  initial begin
    dg = '0; bt = '0;
    apply();
    for (int k = 0; k < NMAX; k++) dg[k] = 4'd9;
    bt = '1;
    apply();
    for (int n = 0; n < NRAND; n++) begin
      for (int k = 0; k < NMAX; k++) dg[k] = 4'($urandom_range(0, 9));
      bt = NMAX'($urandom);
      // bias some vectors towards large digits
      if (n % 4 == 0) for (int k = 0; k < NMAX; k++) dg[k] = 4'($urandom_range(6, 9));
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
