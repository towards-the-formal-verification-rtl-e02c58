// Test of the majority filter: random samples, the voted output is
// compared with a majority of five computed from the test's own history
// (the current sample and the four before it; 1s after reset).
`timescale 1ns/1ps
module tb_maj_voter;
  logic clk = 0, rst_n = 0, rhat = 1, v;
  logic [3:0] sh;
  logic [3:0] hist;
  int checks = 0, failures = 0, n1;

  maj_voter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    hist = 4'hF;
    repeat (1000) begin
      @(negedge clk);
      rhat = ($urandom % 3) != 0;
      #1;
      n1 = int'(rhat) + int'(hist[0]) + int'(hist[1]) + int'(hist[2]) + int'(hist[3]);
      checks++;
      if (v != (n1 >= 3)) begin
        failures++;
        $display("FAIL v=%b ones=%0d", v, n1);
      end
      @(posedge clk);
      hist = {hist[2:0], rhat};
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
