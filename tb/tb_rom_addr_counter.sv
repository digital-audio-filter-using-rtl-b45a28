// Testbench for rom_addr_counter: after reset the address must start at 0,
// step by one every clock and wrap from TAPS-1 to 0. Checked for the default
// 16-tap counter and for a 5-tap counter (wrap at a non-power of two).
module tb_rom_addr_counter;
  logic clk = 0, rst_n = 0;
  logic [3:0] a16;
  logic [2:0] a5;
  int checks = 0, failures = 0;

  rom_addr_counter                dut16 (.clk, .rst_n, .addr(a16));
  rom_addr_counter #(.TAPS(5))    dut5  (.clk, .rst_n, .addr(a5));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      checks += 2;
      if (a16 != 4'(t % 16)) begin failures++; $display("cycle %0d: a16=%0d", t, a16); end
      if (a5  != 3'(t % 5))  begin failures++; $display("cycle %0d: a5=%0d", t, a5); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
