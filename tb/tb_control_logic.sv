// Testbench for control_logic: every ROM address is applied; latch_en must be
// high only at address 0 and mux_sel must be the OR of the address bits.
module tb_control_logic;
  logic [3:0] rom_addr;
  logic latch_en, mux_sel;
  int checks = 0, failures = 0;

  control_logic dut (.rom_addr, .latch_en, .mux_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      rom_addr = 4'(a);
      #1;
      checks += 2;
      if (latch_en !== (a == 0)) begin failures++; $display("addr %0d latch_en=%b", a, latch_en); end
      if (mux_sel  !== (a != 0)) begin failures++; $display("addr %0d mux_sel=%b", a, mux_sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
