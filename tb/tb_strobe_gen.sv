// Test of the strobe counter: with occasional random sync pulses the
// strobe must come exactly 4 cycles after each sync and every 8 cycles
// after that; the count is compared with an independent model.
`timescale 1ns/1ps
module tb_strobe_gen;
  logic clk = 0, rst_n = 0, sync = 0, strobe;
  logic [2:0] cnt;
  int checks = 0, failures = 0;
  int since_sync, model;

  strobe_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    model = 1;   // one edge since reset release
    since_sync = -1;
    repeat (2000) begin
      @(negedge clk);
      sync = ($urandom % 23) == 0;
      if (sync) model = 0;
      #1;
      checks++;
      if (cnt != 3'(model) || strobe != (model == 4)) begin
        failures++;
        $display("FAIL cnt=%0d strobe=%b model=%0d", cnt, strobe, model);
      end
      if (sync) since_sync = 0;
      else if (since_sync >= 0) since_sync++;
      if (since_sync >= 0) begin
        checks++;
        if (strobe != (since_sync % 8 == 4)) failures++;
      end
      model = (model + 1) % 8;
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
