// Testbench for ram_addr_gen: it is driven by a ROM address that counts
// 0..15 as in the processor. Within each sample period the RAM addresses must
// be base, base+1, ... base+15 (mod 16), and the base of each period must be
// one less than that of the period before.
module tb_ram_addr_gen;
  logic clk = 0, rst_n = 0;
  logic [3:0] rom_addr, ram_addr;
  int checks = 0, failures = 0;
  int base, prev_base;

  ram_addr_gen dut (.clk, .rst_n, .rom_addr, .ram_addr);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (!rst_n) rom_addr <= '0;
    else        rom_addr <= rom_addr + 1'b1;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    prev_base = -1;
    @(negedge clk);
    for (int f = 0; f < 20; f++) begin
      base = int'(ram_addr);
      checks++;
      if (rom_addr != 0) begin failures++; $display("frame %0d not aligned", f); end
      if (f == 0) begin
        checks++;
        if (base != 0) begin failures++; $display("reset base %0d", base); end
      end else begin
        checks++;
        if (base != (prev_base + 15) % 16) begin
          failures++; $display("frame %0d base %0d after %0d", f, base, prev_base);
        end
      end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (ram_addr != 4'((base + k) % 16)) begin
          failures++; $display("frame %0d tap %0d ram_addr=%0d", f, k, ram_addr);
        end
        @(negedge clk);
      end
      prev_base = base;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
