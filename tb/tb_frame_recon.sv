// Test of the receiver's frame register.  Random strobe, v and idle inputs
// drive frame_recon (with a small width, so that overflow happens); a
// reference model in the testbench keeps the expected bit string and its
// length, and both outputs are compared after every clock edge.  Rules
// checked: a strobe with v = 0 in idle restarts the frame with a single 0,
// strobes outside idle append v, the length stops at the width, other
// cycles leave the register unchanged.
`timescale 1ns/1ps
module tb_frame_recon;
  localparam int FB = 24;
  logic clk = 0, rst_n = 0, strobe = 0, v = 1, idle = 1;
  logic [FB-1:0]           fhat, e_fhat;
  logic [$clog2(FB+1)-1:0] fhat_len;
  int   e_len, checks = 0, failures = 0, n_restart = 0, n_full = 0;

  frame_recon #(.F_BITS(FB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: got %h/%0d exp %h/%0d", what, $time, fhat, fhat_len,
               e_fhat, e_len);
    end
  endtask

  initial begin
    e_fhat = '0;
    e_len  = 0;
    #12 rst_n = 1;
    chk(fhat == '0 && fhat_len == '0, "reset value");
    repeat (5000) begin
      @(negedge clk);
      strobe = ($urandom % 3) == 0;
      v      = 1'($urandom);
      if (($urandom % 40) == 0) idle = !idle;
      @(posedge clk);
      if (strobe && idle && !v) begin
        e_fhat = '0;
        e_len  = 1;
        n_restart++;
      end else if (strobe && !idle) begin
        e_fhat = {e_fhat[FB-2:0], v};
        if (e_len < FB) e_len++;
        else n_full++;
      end
      #1;
      chk(fhat == e_fhat && int'(fhat_len) == e_len, "frame register");
    end
    chk(n_restart > 10 && n_full > 0, "restarts and overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
