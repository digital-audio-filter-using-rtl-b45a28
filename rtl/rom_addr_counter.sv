// rom_addr_counter: the tap sequencer of the FIR processor.
//
// A free-running up-counter that steps through the coefficient-ROM addresses
// 0, 1, ..., TAPS-1 and wraps to 0, one address per clock. One full pass is
// one sample period: address 0 is the cycle in which a new input sample is
// taken and the previous output is latched. With TAPS = 16 it is the plain
// 4-bit counter of the original design; for other lengths it wraps at TAPS-1
// explicitly. Synchronous active-low reset to address 0.
//
// Interface: clk, rst_n in; addr out (registered).
module rom_addr_counter #(
  parameter int unsigned TAPS = fir_pkg::TAPS,
  localparam int unsigned AW  = $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] addr
);

  localparam logic [AW-1:0] LAST = AW'(TAPS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)            addr <= '0;
    else if (addr == LAST) addr <= '0;
    else                   addr <= addr + 1'b1;
  end

endmodule
