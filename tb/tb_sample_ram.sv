// Testbench for sample_ram: writes random words to random addresses, checks
// that a read returns the last word written there, and that during a write
// cycle the read port still shows the old word.
module tb_sample_ram;
  logic clk = 0, we = 0;
  logic [3:0] addr;
  logic signed [15:0] wdata, rdata;
  logic signed [15:0] model [16];
  int checks = 0, failures = 0;

  sample_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word first so that nothing unwritten is compared.
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; addr = 4'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      addr = 4'($urandom);
      we = ($urandom % 2) == 1;
      wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("t=%0d addr %0d read %0d want %0d", t, addr, rdata, model[addr]); end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
