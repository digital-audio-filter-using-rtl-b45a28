// fir_processor: a TAPS-tap FIR filter built around one multiplier and one
// accumulator, for audio-rate signals.
//
// Instead of TAPS multipliers (direct or transposed form), the processor runs
// TAPS clocks per sample and spends one clock on each tap:
//   - rom_addr_counter steps the tap index k = 0..TAPS-1 (ROM address);
//   - coeff_rom gives b[k];
//   - ram_addr_gen addresses sample_ram so that the word read at tap k holds
//     x[n-k]; at k = 0 the new sample x_in is written into the RAM;
//   - sample_mux, selected by the OR of the ROM address bits, feeds the
//     multiplier x_in itself at k = 0 and the RAM word otherwise;
//   - mac_unit forms sum_k b[k]*x[n-k], restarting at k = 0;
//   - output_latch, enabled at k = 0, takes the finished sum of the previous
//     sample period, rounds and saturates it to DATA_W bits.
// All control comes from decoding the ROM address (control_logic); there is
// no state machine. Everything is synchronous to clk (the original two-phase
// clocking is replaced by clock enables).
//
// Timing: the sample rate is f_clk / TAPS (16 taps at 24 kHz -> 384 kHz).
// x_in is taken at the clock edge that ends the cycle in which sample_take is
// high. The output computed from it is in y_out TAPS clocks after that edge,
// and y_valid is high for the cycle that follows the update. A new output
// appears every TAPS clocks. The first TAPS-1 outputs after reset include
// whatever the sample RAM held.
//
// The structure, the tap count and the control decoding follow the original
// design; the word widths, coefficients, rounding and saturation are this
// design's own choices.
module fir_processor #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned FRAC   = fir_pkg::COEF_FRAC,
  parameter logic signed [COEF_W-1:0] COEFFS [TAPS] = fir_pkg::LPF16_COEFFS,
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(TAPS),
  localparam int unsigned AW    = $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     sample_take,
  output logic signed [DATA_W-1:0] y_out,
  output logic                     y_valid,
  output logic                     y_sat
);

  logic [AW-1:0]            rom_addr, ram_addr;
  logic                     latch_en, mux_sel;
  logic signed [COEF_W-1:0] coef;
  logic signed [DATA_W-1:0] x_stored, x_mul;
  logic signed [ACC_W-1:0]  acc;

  rom_addr_counter #(.TAPS(TAPS)) u_rom_cnt (
    .clk, .rst_n, .addr(rom_addr)
  );

  control_logic #(.TAPS(TAPS)) u_ctrl (
    .rom_addr, .latch_en, .mux_sel
  );

  ram_addr_gen #(.TAPS(TAPS)) u_ram_gen (
    .clk, .rst_n, .rom_addr, .ram_addr
  );

  coeff_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .COEFFS(COEFFS)) u_rom (
    .addr(rom_addr), .coef
  );

  // The new sample is written in the same cycle the multiplier uses it.
  sample_ram #(.TAPS(TAPS), .DATA_W(DATA_W)) u_ram (
    .clk, .we(~mux_sel), .addr(ram_addr), .wdata(x_in), .rdata(x_stored)
  );

  sample_mux #(.DATA_W(DATA_W)) u_mux (
    .sel(mux_sel), .x_new(x_in), .x_stored, .x_out(x_mul)
  );

  mac_unit #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .first(~mux_sel), .x(x_mul), .c(coef), .acc
  );

  output_latch #(.DATA_W(DATA_W), .ACC_W(ACC_W), .FRAC(FRAC)) u_out (
    .clk, .rst_n, .en(latch_en), .acc, .y(y_out), .sat(y_sat), .valid(y_valid)
  );

  assign sample_take = ~mux_sel;

  // One sample is taken, and one output produced, every TAPS clocks.
  a_take_period: assert property (@(posedge clk) disable iff (!rst_n)
    sample_take |=> !sample_take [*TAPS-1] ##1 sample_take);

endmodule
