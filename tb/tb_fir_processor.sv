// End-to-end testbench for fir_processor at its default 16-tap size.
//
// A sample source presents a new x_in every sample period and changes it right
// after the clock edge that takes it (sample_take high). Every output is
// compared with a reference convolution computed here from the 16 coefficients
// of the intended low-pass filter and the samples sent:
//   y[n] = clip16( floor( (sum_k b[k]*x[n-k] + 2^14) / 2^15 ) ).
// Outputs that depend on RAM contents from before the first sample are not
// compared. Stimulus, in order: zeros, a unit impulse (32767), a step to
// 32767, a full-scale square wave (-32768 / 32767, whose overshoot clips),
// random samples, and a linear chirp. It also checks that the impulse response
// reproduces the coefficients, that the output appears exactly TAPS clocks
// after its sample is taken, and that a new output comes every TAPS clocks.
// Mechanisms counted (each must occur): sample bypass through the multiplexer,
// output latch updates, outputs that are only right if the RAM
// address stepped back at each period boundary, clipped outputs.
module tb_fir_processor;
  localparam int T = 16;
  localparam int NSAMP = 400;
  localparam logic signed [15:0] B [T] = '{
    -16'sd103, 16'sd45, 16'sd440, 16'sd73, -16'sd1709, -16'sd1233, 16'sd5423, 16'sd13448,
    16'sd13448, 16'sd5423, -16'sd1233, -16'sd1709, 16'sd73, 16'sd440, 16'sd45, -16'sd103};

  logic clk = 0, rst_n = 0;
  logic signed [15:0] x_in, y_out;
  logic sample_take, y_valid, y_sat;

  fir_processor dut (.clk, .rst_n, .x_in, .sample_take, .y_out, .y_valid, .y_sat);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_latch = 0, n_skip = 0, n_sat = 0;
  logic signed [15:0] xs [NSAMP];
  longint cyc = 0, take_cyc [NSAMP], last_valid = -1;
  int taken = 0, outs = 0;

  function automatic logic signed [15:0] stim(int n);
    real ph;
    if (n < 20)  return 16'sd0;
    if (n == 20) return 16'sd32767;              // impulse
    if (n < 40)  return 16'sd0;
    if (n < 80)  return 16'sd32767;              // step
    if (n < 160) return ((n / 10) % 2 == 1) ? 16'sd32767 : -16'sd32768;  // full-scale square
    if (n < 260) return 16'($urandom);           // random
    ph = 3.14159265 * 0.002 * real'((n - 260) * (n - 260));          // chirp
    return 16'($rtoi(30000.0 * $sin(ph)));
  endfunction

  function automatic longint expect_y(int n);
    longint s, r;
    s = 0;
    for (int k = 0; k < T; k++) s += longint'(B[k]) * longint'(xs[n - k]);
    r = (s + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog: taken=%0d outs=%0d", taken, outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial x_in = '0;

  // Sample source and cycle counter.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sample_take && taken < NSAMP) begin
      xs[taken] = x_in;
      take_cyc[taken] = cyc;
      taken++;
      n_bypass++;
      x_in <= stim(taken);
    end
  end

  // Output checker: the k-th y_valid pulse after reset reports the latch
  // update caused by sample k-1 (the first update latches the reset value).
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      n_latch++;
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != longint'(T)) begin failures++; $display("output period %0d", cyc - last_valid); end
      end
      last_valid = cyc;
      if (outs >= 1 && outs - 1 < taken) begin
        int n;
        n = outs - 1;
        checks++;
        // y_valid is sampled one clock after the update, which is T clocks after the take.
        if (cyc - take_cyc[n] != longint'(T) + 1) begin failures++; $display("latency of sample %0d: %0d", n, cyc - take_cyc[n]); end
        if (n >= T - 1) begin
          longint e;
          e = expect_y(n);
          checks++;
          if (longint'(y_out) != e) begin failures++; $display("y[%0d]=%0d want %0d", n, y_out, e); end
          // A correct output from sample T on needs the RAM address to have
          // dropped back by one (a suppressed step) at every period boundary.
          else if (n >= T) n_skip++;
          checks++;
          if (y_sat && e != 32767 && e != -32768) begin
            failures++; $display("y_sat set on unclipped y[%0d]", n);
          end
          if (y_sat) n_sat++;
          if (n >= 20 && n < 20 + T) begin
            checks++;
            if (longint'(y_out) != longint'(B[n - 20])) begin
              failures++; $display("impulse response h[%0d]=%0d want %0d", n - 20, y_out, B[n - 20]);
            end
          end
        end
      end
      outs++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (outs == NSAMP);
    @(posedge clk);
    checks += 4;
    if (n_bypass == 0) begin failures++; $display("no sample bypass"); end
    if (n_latch == 0)  begin failures++; $display("no output latch update"); end
    if (n_skip == 0)   begin failures++; $display("no suppressed RAM step"); end
    if (n_sat == 0)    begin failures++; $display("no clipped output"); end
    $display("bypass=%0d latch=%0d ram_skip=%0d clipped=%0d", n_bypass, n_latch, n_skip, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
