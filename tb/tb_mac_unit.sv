// Testbench for mac_unit: random operand streams in groups of 16 products,
// `first` high on the first product of each group. After each group the
// accumulator must equal the sum computed here with 64-bit integers,
// including the extreme operands -32768 * -32768.
module tb_mac_unit;
  logic clk = 0, rst_n = 0, first;
  logic signed [15:0] x, c;
  logic signed [35:0] acc;
  longint sum;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst_n, .first, .x, .c, .acc);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    first = 0; x = 0; c = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (acc != 0) begin failures++; $display("acc not cleared by reset"); end
    rst_n = 1;
    for (int g = 0; g < 40; g++) begin
      sum = 0;
      for (int k = 0; k < 16; k++) begin
        first = (k == 0);
        if (g == 0) begin x = -16'sd32768; c = -16'sd32768; end
        else if (g == 1) begin x = 16'sd32767; c = -16'sd32768; end
        else begin x = 16'($urandom); c = 16'($urandom); end
        sum += longint'(x) * longint'(c);
        @(negedge clk);
      end
      checks++;
      if (longint'(acc) != sum) begin failures++; $display("group %0d acc=%0d want %0d", g, acc, sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
