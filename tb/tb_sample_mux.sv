// Testbench for sample_mux: random operands, both select values.
module tb_sample_mux;
  logic sel;
  logic signed [15:0] x_new, x_stored, x_out;
  int checks = 0, failures = 0;

  sample_mux dut (.sel, .x_new, .x_stored, .x_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel = t[0];
      x_new = 16'($urandom); x_stored = 16'($urandom);
      #1;
      checks++;
      if (x_out !== (t[0] ? x_stored : x_new)) begin failures++; $display("t=%0d sel=%b out=%0d", t, sel, x_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
