// mac_unit: the single multiplier and accumulator of the FIR processor.
//
// Each clock it multiplies one sample by one coefficient (full-precision
// signed product) and adds the product to the accumulator. When `first` is
// high (the first tap of a sample period) the old sum is dropped and the
// accumulator is loaded with the product alone, so after TAPS clocks it holds
// sum_k b[k]*x[n-k]. ACC_W carries log2(TAPS) guard bits over the product, so
// the sum cannot overflow. Synchronous active-low reset clears the
// accumulator. The sum is visible on `acc` one clock after the last product.
module mac_unit #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     first,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] c,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [DATA_W+COEF_W-1:0] prod;
  logic signed [ACC_W-1:0]         base;

  always_comb begin
    prod = x * c;
    base = first ? '0 : acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= base + ACC_W'(prod);
  end

endmodule
