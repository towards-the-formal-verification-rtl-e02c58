// Test of the serial sender: frames of random length (0..20 bytes) with
// random contents.  The bus value and driver enable of every cycle are
// compared with the expected pattern: each bit of TSS, FSS, (BSS, byte)*,
// FES repeated 8 times, bytes MSB first, driver enabled exactly for the
// 8*(4+10*len) cycles of the frame, done in the last of them, bus_o 1 and
// the driver off between frames.  Also checks that bus_o only changes
// when the frame bit changes.
`timescale 1ns/1ps
module tb_serial_tx;
  localparam int LW = 9;
  logic clk = 0, rst_n = 0, start = 0;
  logic [LW-1:0] len, rd_addr;
  logic [7:0] rd_byte, mem [256];
  logic bus_o, bus_en, busy, done;
  logic frame [$];
  int checks = 0, failures = 0;

  serial_tx #(.LEN_W(LW)) dut (.*);
  always #5 clk = ~clk;
  assign rd_byte = mem[rd_addr[7:0]];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int n;
    len = 0;
    #12 rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      n = (f == 0) ? 0 : $urandom_range(1, 20);
      for (int k = 0; k < 256; k++) mem[k] = 8'($urandom);
      frame = {};
      frame.push_back(0); frame.push_back(1);
      for (int k = 0; k < n; k++) begin
        frame.push_back(1); frame.push_back(0);
        for (int b = 7; b >= 0; b--) frame.push_back(mem[k][b]);
      end
      frame.push_back(0); frame.push_back(1);
      @(negedge clk);
      chk(!bus_en && bus_o && !busy, "idle before start");
      len = LW'(n);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < frame.size() * 8; i++) begin
        chk(bus_en && bus_o == frame[i / 8], $sformatf("frame %0d bit %0d", f, i / 8));
        chk(done == (i == frame.size() * 8 - 1), "done timing");
        // a start while busy must be ignored
        start = (i == 20);
        @(negedge clk);
        start = 0;
      end
      chk(!bus_en && bus_o, "driver released after the frame");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
