// Cluster test with the closed-form schedule for equal message lengths:
// 8 slots per round, 8-byte messages (l' = 84 frame bits), processor window
// tp = 4 timer ticks, slot s sent by ECU (s mod 4) + 1, and
//     st(s)     = tp + ceil((1+d) * (l' + tp) * s)
//     wakeup(s) = tp + ceil((1+d) * ((l' + tp) * s + l')) + 3
// with d = 0.15 %.  This is the tightest spacing the sequencer accepts
// (wakeup(s) must come before st(s+1)).  The clocks of the four ECUs differ
// by up to 0.3 %.  Three rounds are run; every byte every ECU stores in its
// receive buffer is compared with the sender's message, frames must be at
// least 8 cycles apart on the bus, only one driver may be on, and no
// framing error may occur.
`timescale 1ps/1ps
module tb_cluster_tight_schedule;
  import fr_pkg::*;

  localparam int N = 4, NS = 8, MLEN = 8, TP = 4, ROUNDS = 3;
  localparam int LF = 4 + 10 * MLEN;
  localparam int PER [N] = '{10000, 10015, 9985, 10007};
  localparam int PH  [N] = '{0, 4100, 2700, 7900};

  logic [N-1:0]           clk, rst_n;
  io_req_t                io_req [N];
  logic [N-1:0][IO_W-1:0] io_rdata;
  logic [N-1:0]           io_rvalid, irq;
  logic                   bus;
  int checks = 0, failures = 0, n_bytes = 0, n_frames = 0, configured = 0;

  flexray_cluster dut (.clk, .rst_n, .io_req, .io_rdata, .io_rvalid, .irq, .bus);

  function automatic logic [7:0] msg_byte(int ecu, int k);
    return 8'(ecu * 53 + k * 29 + 11);
  endfunction
  function automatic int ceil_d(int t);       // ceil(t * 1.0015)
    return (t * 10015 + 9999) / 10000;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar i = 0; i < N; i++) begin : g_cpu
    initial begin
      clk[i] = 1'b0;
      #(PH[i]);
      forever #(PER[i] / 2) clk[i] = ~clk[i];
    end

    task automatic wr(logic [7:0] a, logic [31:0] d);
      @(negedge clk[i]);
      io_req[i] <= '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
      @(negedge clk[i]);
      io_req[i] <= '0;
    endtask

    initial begin
      io_req[i] = '0;
      rst_n[i]  = 1'b0;
      repeat (3) @(posedge clk[i]);
      rst_n[i] <= 1'b1;
      wr(A_U, 32'(i + 1));
      for (int s = 0; s < NS; s++) begin
        wr({A_ECU, 5'(s)},    32'(s % N + 1));
        wr({A_ST, 5'(s)},     32'(TP + ceil_d((LF + TP) * s)));
        wr({A_MLEN, 5'(s)},   32'(MLEN));
        wr({A_WAKEUP, 5'(s)}, 32'(TP + ceil_d((LF + TP) * s + LF) + 3));
      end
      for (int k = 0; k < MLEN; k += 4)
        wr(A_DATA, {msg_byte(i + 1, k + 3), msg_byte(i + 1, k + 2),
                    msg_byte(i + 1, k + 1), msg_byte(i + 1, k)});
      wr(A_NS, NS);
      configured++;
    end

    always @(posedge clk[i]) if (rst_n[i]) begin
      if (dut.g_ecu[i].u_if.rx_valid) begin
        n_bytes++;
        check(dut.g_ecu[i].u_if.rx_byte ==
              msg_byte(int'(dut.g_ecu[i].u_if.sigma) % N + 1, int'(dut.g_ecu[i].u_if.rx_idx)),
              $sformatf("ecu %0d slot %0d byte %0d", i, dut.g_ecu[i].u_if.sigma,
                        dut.g_ecu[i].u_if.rx_idx));
      end
      if (dut.g_ecu[i].u_if.rx_err) check(0, "framing error");
      if (i == 0 && dut.g_ecu[i].u_if.rx_done) n_frames++;
    end
  end

  longint t_release = -1;
  bit run = 0;   // bus checks start once every ECU is out of reset
  initial #(100_000) run = 1;
  always @(dut.drv_en) if (run) begin
    check($countones(dut.drv_en) <= 1, "one driver at a time");
    if (dut.drv_en == '0) t_release = $time;
    else if (t_release >= 0) check($time - t_release >= 8 * 10000, "gap between frames");
  end

  initial begin
    wait (n_frames == NS * ROUNDS);
    repeat (100) @(posedge clk[0]);
    check(n_bytes == N * NS * ROUNDS * MLEN, "all bytes received");
    $display("frames=%0d bytes=%0d", n_frames, n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd600_000_000);
    failures++;
    $display("watchdog expired, frames=%0d", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
