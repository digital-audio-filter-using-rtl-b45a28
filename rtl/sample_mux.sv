// sample_mux: selects the data operand of the multiplier.
//
// sel = 0 (ROM address 0, the first tap) passes the new input sample x_new,
// which is being written into the sample RAM in that same cycle and so cannot
// yet be read back; sel = 1 passes the word read from the sample RAM.
// Combinational 2:1 multiplexer.
module sample_mux #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W
) (
  input  logic                     sel,
  input  logic signed [DATA_W-1:0] x_new,
  input  logic signed [DATA_W-1:0] x_stored,
  output logic signed [DATA_W-1:0] x_out
);

  always_comb x_out = sel ? x_stored : x_new;

endmodule
