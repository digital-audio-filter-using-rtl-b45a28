// coeff_rom: read-only memory of the filter coefficients b[0..TAPS-1].
//
// Word k holds the coefficient that multiplies x[n-k]. The contents are set by
// the COEFFS parameter, so a different filter (low-pass, high-pass, band-pass,
// band-stop) is a different parameter value; the default is the 16-tap
// low-pass set of fir_pkg. Asynchronous (combinational) read, as in a LUT
// ROM, so the coefficient is available in the same cycle as its address.
module coeff_rom #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEFFS [TAPS] = fir_pkg::LPF16_COEFFS,
  localparam int unsigned AW    = $clog2(TAPS)
) (
  input  logic [AW-1:0]            addr,
  output logic signed [COEF_W-1:0] coef
);

  always_comb begin
    coef = '0;
    for (int unsigned k = 0; k < TAPS; k++)
      if (addr == AW'(k)) coef = COEFFS[k];
  end

endmodule
