// Test of the open-collector bus: all 256 combinations of 4 driver enables
// and values; the line must be 0 exactly when an enabled driver holds 0.
`timescale 1ns/1ps
module tb_flexray_bus;
  logic [3:0] en, val;
  logic bus, exp_bus;
  int checks = 0, failures = 0;

  flexray_bus #(.N(4)) dut (.*);

  initial begin
    for (int i = 0; i < 256; i++) begin
      {en, val} = 8'(i);
      #1;
      exp_bus = 1'b1;
      for (int k = 0; k < 4; k++) if (en[k] && !val[k]) exp_bus = 1'b0;
      checks++;
      if (bus != exp_bus) begin
        failures++;
        $display("FAIL en=%b val=%b bus=%b", en, val, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
