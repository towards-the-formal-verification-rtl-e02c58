// Sender-to-receiver test across two clock domains.  A serial_tx in one
// clock domain sends random frames to serial_rx in another; the receiver's
// clock is 0.15 % slower in the first half of the frames and 0.15 % faster
// in the second, with a random phase for each frame.  Every byte must
// arrive with its index, each frame must end with frame_done within
// (1+d)*L + 8 receiver cycles (plus 2 for the start and done registers) of
// the start, L being the frame length in cycles, and no error may occur.
// The line reaches the receiver after a propagation delay drawn per frame
// from [0, half a sender cycle), and after every transition it shows random
// values for 2 ns (a fifth of a cycle) before it settles, so that receiver
// edges falling in that window sample garbage, as a register whose setup
// or hold time is violated would.
// At frame_done the receiver's frame register must hold exactly f(m):
// TSS, FSS, for each byte BSS and the byte MSB first, then FES.
// Sync pulses that moved the sample point are counted; some must occur.
`timescale 1ps/1ps
module tb_serial_rx;
  localparam int LW = 9;
  localparam int TS = 10000;
  logic clk_s = 0, clk_r = 0, rst_n = 0;
  int   tr = 10015;
  logic start = 0;
  logic [LW-1:0] len, rd_addr;
  logic [7:0] rd_byte, mem [256];
  logic bus_o, bus_en, busy_tx, done_tx, bus;
  logic force_idle = 0;
  logic [7:0] byte_o;
  logic byte_valid, frame_done, frame_err, busy, sync, strobe;
  logic [LW-1:0] byte_idx;
  int checks = 0, failures = 0, n_bytes, n_done, n_corr = 0;
  longint t0;

  serial_tx #(.LEN_W(LW)) u_tx (.clk(clk_s), .rst_n, .start, .len, .rd_addr,
    .rd_byte, .bus_o, .bus_en, .busy(busy_tx), .done(done_tx));
  assign rd_byte = mem[rd_addr[7:0]];
  logic bus_src;
  int   pd = 0;
  assign bus_src = bus_en ? bus_o : 1'b1;
  bit unstable = 1'b0;
  int n_garbage = 0;
  always @(posedge clk_r) if (unstable) n_garbage++;
  initial begin
    logic last;
    bus = 1'b1;
    last = 1'b1;
    forever begin
      @(bus_src);
      if (bus_src !== last) begin
        last = bus_src;
        #(pd);
        unstable = 1'b1;
        repeat (20) begin
          bus = 1'($urandom);
          #100;
        end
        bus = last;
        unstable = 1'b0;
      end
    end
  end
  localparam int FB = 2564;
  logic [FB-1:0]          fhat;
  logic [$clog2(FB+1)-1:0] fhat_len;
  serial_rx #(.LEN_W(LW), .F_BITS(FB)) dut (.clk(clk_r), .rst_n, .bus_i(bus), .force_idle,
    .byte_o, .byte_valid, .byte_idx, .frame_done, .frame_err, .busy, .sync, .strobe,
    .fhat, .fhat_len);

  // f(m) for the current len and mem, first bit at the highest index
  function automatic logic [FB-1:0] frame_of(int n);
    logic [FB-1:0] e = '0;
    e = {e[FB-3:0], 2'b01};                 // TSS, FSS
    for (int k = 0; k < n; k++) e = {e[FB-11:0], 2'b10, mem[k]};
    e = {e[FB-3:0], 2'b01};                 // FES
    return e;
  endfunction

  always #(TS / 2) clk_s = ~clk_s;
  initial forever #(tr / 2) clk_r = ~clk_r;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk_r) if (rst_n) begin
    if (byte_valid) begin
      chk(byte_o == mem[byte_idx[7:0]], $sformatf("byte %0d", byte_idx));
      n_bytes++;
    end
    if (frame_done) begin
      n_done++;
      chk(int'(fhat_len) == 4 + 10 * int'(len) && fhat == frame_of(int'(len)),
          "reconstructed frame equals f(m)");
      chk($time - t0 <= longint'((8 * (4 + 10 * len) * 10015 / 10000 + 8 + 2) * tr),
          "receive latency");
    end
    if (frame_err) chk(0, "frame error");
    if (sync && dut.state != fr_pkg::POS_IDLE && dut.u_strobe.cnt_q != 3'd0) n_corr++;
  end

  initial begin
    int n;
    #25000 rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      if (f == 20) tr = 9985;
      n = $urandom_range(1, 60);
      pd = $urandom_range(0, TS / 2 - 1);
      for (int k = 0; k < 256; k++) mem[k] = 8'($urandom);
      n_bytes = 0; n_done = 0;
      #($urandom_range(0, TS));
      @(negedge clk_s);
      len = LW'(n);
      start = 1;
      t0 = $time + TS / 2 + pd;
      @(negedge clk_s);
      start = 0;
      while (busy_tx) @(negedge clk_s);
      repeat (30) @(negedge clk_s);
      chk(n_bytes == n && n_done == 1, $sformatf("frame %0d complete (%0d bytes)", f, n_bytes));
    end
    chk(n_corr > 0, "drift corrections happened");
    $display("drift corrections: %0d", n_corr);
    chk(n_garbage > 0, "edges sampled an unstable line");
    $display("edges in unstable windows: %0d", n_garbage);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd5_000_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
