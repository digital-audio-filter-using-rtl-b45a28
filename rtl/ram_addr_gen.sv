// ram_addr_gen: address generator of the sample RAM, which it turns into a
// circular delay line.
//
// The RAM address counter steps once per clock like the ROM counter, except
// that one step per sample period is suppressed: the step that would follow
// the last tap (ROM address all ones, detected by ANDing the address bits).
// Within a sample period the RAM address therefore runs a, a+1, ..., a+TAPS-1
// (mod TAPS) alongside ROM addresses 0..TAPS-1, and the next period starts at
// a-1. The new sample is written at ROM address 0, i.e. at RAM address a, so
// the word read with coefficient k always holds x[n-k].
//
// The original circuit suppresses a pulse of a gated clock (AND gate, a
// flip-flop on a second clock phase, an inverter, and a second AND gate with
// CLK). This design keeps one clock and uses the decoded signal as a clock
// enable instead, which gives the same address sequence without a gated clock.
// Synchronous active-low reset to address 0.
//
// Interface: rom_addr in (the current tap); ram_addr out (registered).
module ram_addr_gen #(
  parameter int unsigned TAPS = fir_pkg::TAPS,
  localparam int unsigned AW  = $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] rom_addr,
  output logic [AW-1:0] ram_addr
);

  localparam logic [AW-1:0] LAST = AW'(TAPS - 1);

  logic step_en;   // low in the last tap of each sample period

  assign step_en = (rom_addr != LAST);

  always_ff @(posedge clk) begin
    if (!rst_n)                ram_addr <= '0;
    else if (step_en) begin
      if (ram_addr == LAST)    ram_addr <= '0;
      else                     ram_addr <= ram_addr + 1'b1;
    end
  end

endmodule
