// Test of the two-register bus synchroniser: after reset both registers
// read 1; afterwards r is the bus one edge earlier and rhat two edges
// earlier, for a random bus sequence.
`timescale 1ns/1ps
module tb_rx_sync;
  logic clk = 0, rst_n = 0, bus_i = 1, r, rhat;
  logic h1, h2;
  int checks = 0, failures = 0;

  rx_sync dut (.*);
  always #5 clk = ~clk;

  initial begin
    bus_i = 0;
    #12;
    checks++; if (!(r == 1 && rhat == 1)) failures++;
    bus_i = 1;
    rst_n = 1;
    h1 = 1; h2 = 1;
    repeat (500) begin
      @(negedge clk);
      bus_i = 1'($urandom);
      @(posedge clk);
      h2 = h1; h1 = bus_i;
      #1;
      checks++;
      if (r != h1 || rhat != h2) begin
        failures++;
        $display("FAIL r=%b rhat=%b expected %b %b", r, rhat, h1, h2);
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
