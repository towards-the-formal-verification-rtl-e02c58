// Test of the message buffer: random writes with random byte enables,
// reads at random addresses compared with a model array.
`timescale 1ns/1ps
module tb_msg_buffer;
  localparam int W = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [3:0] wbe = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  msg_buffer #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill everything once so that all words are known
    for (int a = 0; a < W; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wbe = 4'hF; wdata = $urandom;
      model[a] = wdata;
    end
    repeat (2000) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 6'($urandom);
      wbe = 4'($urandom);
      wdata = $urandom;
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) for (int b = 0; b < 4; b++) if (wbe[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
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
