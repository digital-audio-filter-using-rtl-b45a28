// sample_ram: storage for the last TAPS input samples.
//
// A TAPS x DATA_W memory with one synchronous write port and an asynchronous
// read port on the same address, as in an FPGA distributed RAM. A write takes
// effect at the clock edge; in the write cycle the read port still returns
// the old word. The addressing that turns it into a delay line is done by
// ram_addr_gen. The contents are not reset: the first TAPS outputs after
// reset depend on whatever the RAM held.
module sample_ram #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            addr,
  input  logic signed [DATA_W-1:0] wdata,
  output logic signed [DATA_W-1:0] rdata
);

  logic signed [DATA_W-1:0] mem [TAPS];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
