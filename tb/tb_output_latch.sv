// Testbench for output_latch: random and edge-case accumulator values. When
// en is high, y must become round-half-up(acc / 2^15) clipped to 16 bits and
// sat must say whether it was clipped; when en is low, y must hold. valid
// must follow en by one clock.
module tb_output_latch;
  logic clk = 0, rst_n = 0, en;
  logic signed [35:0] acc;
  logic signed [15:0] y;
  logic sat, valid;
  longint r, expv;
  logic exps, en_q;
  logic signed [15:0] y_hold;
  int checks = 0, failures = 0;

  output_latch dut (.clk, .rst_n, .en, .acc, .y, .sat, .valid);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    y_hold = y;
    for (int t = 0; t < 400; t++) begin
      en = ($urandom % 3) != 0;
      case (t % 8)
        0: acc = 36'sd16384;                 // exactly one half: rounds up to 1
        1: acc = -36'sd16384;                // minus one half: rounds up to 0
        2: acc = 36'(longint'(32767) <<< 15) + 36'sd16383; // just below the clip point
        3: acc = 36'(longint'(32767) <<< 15) + 36'sd16384; // rounds to 32768: clips
        4: acc = -36'(longint'(32768) <<< 15);
        5: acc = -36'(longint'(32768) <<< 15) - 36'sd16385;
        default: acc = 36'({$urandom, $urandom}) >>> ($urandom % 18);
      endcase
      r = longint'(acc) + 16384;
      r = r >>> 15;
      exps = 0;
      if (r > 32767) begin expv = 32767; exps = 1; end
      else if (r < -32768) begin expv = -32768; exps = 1; end
      else expv = r;
      en_q = en;
      @(negedge clk);
      checks += 2;
      if (valid !== en_q) begin failures++; $display("t=%0d valid=%b", t, valid); end
      if (en_q) begin
        if (longint'(y) != expv || sat !== exps) begin
          failures++; $display("t=%0d acc=%0d y=%0d sat=%b want %0d %b", t, acc, y, sat, expv, exps);
        end
        y_hold = y;
      end else if (y !== y_hold) begin
        failures++; $display("t=%0d y changed without en", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
