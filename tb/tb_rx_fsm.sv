// Test of the receiver automaton on the bit level: v is held for 8 cycles
// per frame bit and a strobe is given in the middle of each bit, so the
// automaton sees clean samples.  Random frames (1..12 bytes) must give the
// right bytes with their indices and one frame_done; sync must be raised
// exactly at the 1->0 edges at the start of TSS and of each BSS[0] and
// nowhere else.  Corrupted frames (FSS=0, BSS[0]=1, FES[0]=0) must give
// frame_err and no frame_done; force_idle must abort a frame.
`timescale 1ns/1ps
module tb_rx_fsm;
  import fr_pkg::*;
  localparam int LW = 9;
  logic clk = 0, rst_n = 0, force_idle = 0, v = 1, strobe = 0;
  logic sync, byte_valid, frame_done, frame_err;
  frame_pos_t state;
  logic [7:0] byte_o;
  logic [LW-1:0] byte_idx;
  int checks = 0, failures = 0;
  bit check_bytes = 1;
  int n_at_abort;
  bit idle_after_abort;
  int n_bytes, n_done, n_err, n_sync, exp_sync;
  logic [7:0] msg [16];
  logic bits [$];
  int sync_at [$];

  rx_fsm #(.LEN_W(LW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) begin
      if (check_bytes) chk(byte_o == msg[byte_idx[3:0]], $sformatf("byte %0d", byte_idx));
      n_bytes++;
    end
    if (frame_done) n_done++;
    if (frame_err) n_err++;
    if (sync) n_sync++;
  end

  // send one frame bit by bit; corrupt = index of a bit to invert or -1
  task automatic send(int n, int corrupt, int abort_at);
    bits = {};
    bits.push_back(0); bits.push_back(1);
    exp_sync = 1;
    for (int k = 0; k < n; k++) begin
      bits.push_back(1); bits.push_back(0);
      for (int b = 7; b >= 0; b--) bits.push_back(msg[k][b]);
      exp_sync++;
    end
    bits.push_back(0); bits.push_back(1);
    if (corrupt >= 0) bits[corrupt] = !bits[corrupt];
    n_bytes = 0; n_done = 0; n_err = 0; n_sync = 0;
    for (int i = 0; i < bits.size(); i++) begin
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        v = bits[i];
        strobe = (c == 4);
        force_idle = (i == abort_at && c == 0);
        if (force_idle) begin
          n_at_abort = n_bytes;
          @(negedge clk);
          idle_after_abort = (state == POS_IDLE);
          force_idle = 0;
          c++;
        end
      end
    end
    @(negedge clk);
    v = 1; strobe = 0; force_idle = 0;
    // idle bus for 4 bit times with strobes
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      strobe = (c % 8 == 4);
    end
    strobe = 0;
  endtask

  initial begin
    int n;
    #12 rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      n = $urandom_range(1, 12);
      for (int k = 0; k < 16; k++) msg[k] = 8'($urandom);
      send(n, -1, -1);
      chk(n_bytes == n && n_done == 1 && n_err == 0, "clean frame");
      chk(n_sync == exp_sync, $sformatf("sync count %0d expected %0d", n_sync, exp_sync));
      chk(state == POS_IDLE, "idle after frame");
    end
    // FSS corrupted (bit 1), BSS[0] corrupted (bit 3), FES[0] corrupted (last)
    msg[0] = 8'hA5; msg[1] = 8'h3C;
    // (after an error the automaton hunts for a new TSS in the rest of the
    // corrupted frame, so only the first error and the bytes before it are
    // predictable)
    check_bytes = 0;
    send(2, 1, -1);
    chk(n_err >= 1, "FSS error");
    send(2, 3, -1);
    chk(n_err >= 1, "BSS[0] error");
    check_bytes = 1;
    send(2, 2 + 2 * 10 + 1, -1);
    chk(n_err >= 1 && n_done == 0 && n_bytes == 2, "FES[0] error");
    // abort in the middle of the second byte (what follows is the
    // automaton hunting in the rest of the frame, not checked)
    check_bytes = 0;
    send(3, -1, 17);
    chk(n_at_abort == 1 && idle_after_abort, "force_idle aborts the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
