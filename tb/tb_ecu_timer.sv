// Test of the ECU timer: ti must advance once every 8 cycles, tick must
// mark the cycle before each increment, and clr must restart ti and the
// prescaler (the next increment comes 8 cycles after the clear).
`timescale 1ns/1ps
module tb_ecu_timer;
  import fr_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, tick;
  logic [TI_W-1:0] ti;
  int checks = 0, failures = 0;
  int cyc;   // cycles since reset or clear, as seen at the check point

  ecu_timer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ti=%0d cyc=%0d", what, ti, cyc); end
  endtask

  initial begin
    #12 rst_n = 1;
    cyc = 1;   // one edge since reset release
    repeat (3000) begin
      @(negedge clk);
      chk(ti == TI_W'(cyc / 8), "ti value");
      clr = ($urandom % 400) == 0;
      #1;
      chk(tick == (!clr && cyc % 8 == 7), "tick");
      @(posedge clk);
      cyc = clr ? 0 : cyc + 1;
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
