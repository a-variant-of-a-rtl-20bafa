// tb_bd_converter: checks bd_converter for every size used by the
// multiplier (MAXV = 10, 30, 60, 70, 120, 150, 190) and the default
// (160). Every input 0..MAXV is applied and the BCD digits are compared
// with the decimal digits of the input.
module tb_bd_converter;
  import dec_mult_pkg::*;
  localparam int NSZ = 8;
  localparam int SIZES [NSZ] = '{10, 30, 60, 70, 120, 150, 190, 160};

  int checks = 0;
  int failures = 0;
  int v = 0;
  logic strobe = 1'b0;

  for (genvar z = 0; z < NSZ; z++) begin : g_sz
    localparam int MV = SIZES[z];
    localparam int NB = bits_for(MV);
    localparam int ND = digits_for(MV);
    bcd_t [ND-1:0] dec;
    if (z == NSZ - 1) begin : g_def
      bd_converter dut (.bin(NB'(v)), .dec(dec));
    end else begin : g_par
      bd_converter #(.MAXV(MV)) dut (.bin(NB'(v)), .dec(dec));
    end
    always @(posedge strobe) begin
      if (v <= MV) begin
        int t;
        bit bad;
        t = v;
        bad = 1'b0;
        for (int k = 0; k < ND; k++) begin
          if (int'(dec[k]) != t % 10) bad = 1'b1;
          t = t / 10;
        end
        checks++;
        if (bad) begin
          failures++;
          if (failures < 10) $display("FAIL MAXV=%0d in=%0d out=%h", MV, v, dec);
        end
      end
    end
  end

  initial begin
    for (int n = 0; n <= 190; n++) begin
      v = n;
      #1 strobe = 1'b1;
      #1 strobe = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
