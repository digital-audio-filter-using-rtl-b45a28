// control_logic: the gate-level controller of the FIR processor.
//
// The processor needs no state machine: every control signal is a decode of
// the current ROM (tap) address.
//   latch_en = 1 when the address is all zeros. In that cycle the accumulator
//              still holds the finished sum of the previous sample period, so
//              the output latch takes it at the end of the cycle. The original
//              circuit is two AND gates, the second one qualified by a clock
//              phase; here the clock phase is the clock edge itself.
//   mux_sel  = OR of all address bits. It is 0 only at address 0, where the
//              multiplier must use the new input sample, which is not yet in
//              the sample RAM; otherwise 1 (use the stored sample).
// Purely combinational; outputs follow rom_addr in the same cycle.
module control_logic #(
  parameter int unsigned TAPS = fir_pkg::TAPS,
  localparam int unsigned AW  = $clog2(TAPS)
) (
  input  logic [AW-1:0] rom_addr,
  output logic          latch_en,
  output logic          mux_sel
);

  always_comb begin
    mux_sel  = |rom_addr;
    latch_en = ~mux_sel;
  end

endmodule
