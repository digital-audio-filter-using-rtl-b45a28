// output_latch: holds the filter output between updates.
//
// When en is high (once per sample period, at ROM address 0) it takes the
// accumulator, scales it back to sample width by an arithmetic right shift of
// FRAC bits with round-half-up, saturates it to the DATA_W range and stores
// it in y. sat records whether that sample was clipped. valid is a one-clock
// pulse in the cycle after an update. The latch itself follows the original
// design; the rounding and saturation are this design's choice of how to
// narrow the wide sum. Synchronous active-low reset clears all outputs.
module output_latch #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W,
  parameter int unsigned FRAC   = fir_pkg::COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [ACC_W-1:0]  acc,
  output logic signed [DATA_W-1:0] y,
  output logic                     sat,
  output logic                     valid
);

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (DATA_W - 1));

  logic signed [ACC_W-1:0]  rounded;
  logic signed [DATA_W-1:0] y_next;
  logic                     clip;

  always_comb begin
    rounded = (acc + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;
    clip    = 1'b1;
    if (rounded > MAXV)      y_next = MAXV[DATA_W-1:0];
    else if (rounded < MINV) y_next = MINV[DATA_W-1:0];
    else begin
      y_next = rounded[DATA_W-1:0];
      clip   = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y     <= '0;
      sat   <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        y   <= y_next;
        sat <= clip;
      end
    end
  end

endmodule
