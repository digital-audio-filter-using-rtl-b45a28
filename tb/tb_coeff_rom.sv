// Testbench for coeff_rom: reads every word of the default 16-tap ROM and of
// an 8-tap ROM with other contents, and compares with values written here.
module tb_coeff_rom;
  logic [3:0] a16;
  logic [2:0] a8;
  logic signed [15:0] c16, c8;
  int checks = 0, failures = 0;

  localparam logic signed [15:0] EXP16 [16] = '{
    -16'sd103, 16'sd45, 16'sd440, 16'sd73, -16'sd1709, -16'sd1233, 16'sd5423, 16'sd13448,
    16'sd13448, 16'sd5423, -16'sd1233, -16'sd1709, 16'sd73, 16'sd440, 16'sd45, -16'sd103};
  localparam logic signed [15:0] SET8 [8] = '{
    16'sd1, -16'sd2, 16'sd300, 16'sd4000, -16'sd32768, 16'sd32767, 16'sd7, -16'sd9};

  coeff_rom                              dut16 (.addr(a16), .coef(c16));
  coeff_rom #(.TAPS(8), .COEFFS(SET8))   dut8  (.addr(a8),  .coef(c8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    sum = 0;
    for (int k = 0; k < 16; k++) begin
      a16 = 4'(k); a8 = 3'(k % 8);
      #1;
      sum += int'(c16);
      checks += 2;
      if (c16 !== EXP16[k])  begin failures++; $display("rom16[%0d]=%0d", k, c16); end
      if (c8 !== SET8[k % 8]) begin failures++; $display("rom8[%0d]=%0d", k % 8, c8); end
    end
    // The default low-pass has unity DC gain.
    checks++;
    if (sum != 32768) begin failures++; $display("coefficient sum %0d", sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
