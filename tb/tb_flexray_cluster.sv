// End-to-end test of the ECU cluster at its default size (4 ECUs, 64-word
// buffers, 16-slot schedule table).
//
// Each ECU runs on its own clock; the clock periods differ by up to 0.3 %
// (two ECUs 0.15 % fast and slow against a nominal one) and start with
// different phases.  A small processor model per ECU configures the
// schedule (4 slots, ECU s+1 sends in slot s, messages of 5, 12, 1 and 16
// bytes), fills its send buffer, and on every wakeup interrupt reads the
// slot's message out of its receive buffer and compares it with the
// message the sender was given.  After its own slot it loads the message
// for the next round.  Three bus rounds are run.
// Also checked: frame duration on the bus (8 cycles per frame bit), sender
// and receiver of every ECU idle in the cycle its wakeup interrupt shows,
// receive latency against the bound (1+d)*L + 8 receiver cycles plus
// margin, no two drivers enabled at once and at least 8 cycles between
// frames, timers of all ECUs within one tick after each clock
// synchronisation and, from then on, within T*d + 2 ticks of ECU 0's
// timer value T.  Counted mechanisms (each must
// occur): frame transmissions, low-level syncs at TSS and at BSS, sample
// point corrections caused by drift, timer clears, wakeup interrupts,
// forced receiver idle at slot start, data-port reads and writes, frames
// rebuilt in the receivers' frame registers (length and framing bits
// checked).
`timescale 1ps/1ps
module tb_flexray_cluster;
  import fr_pkg::*;

  localparam int N      = 4;
  localparam int NS     = 4;
  localparam int ROUNDS = 3;
  localparam int TP     = 40;              // processor window, timer ticks
  localparam int MLEN [NS] = '{5, 12, 1, 16};
  localparam int PER  [N]  = '{10000, 10015, 9985, 10007};  // ps
  localparam int PH   [N]  = '{0, 3100, 6700, 1900};

  logic [N-1:0]            clk, rst_n;
  io_req_t                 io_req [N];
  logic [N-1:0][IO_W-1:0]  io_rdata;
  logic [N-1:0]            io_rvalid, irq;
  logic                    bus;

  int checks = 0, failures = 0;
  int n_tx = 0, n_sync_tss = 0, n_sync_bss = 0, n_drift = 0, n_clr = 0,
      n_wakeup = 0, n_idle = 0, n_dp_wr = 0, n_dp_rd = 0, n_fhat = 0;
  int done_ecus = 0;
  logic [TI_W-1:0] ti_mon [N];

  flexray_cluster dut (.clk, .rst_n, .io_req, .io_rdata, .io_rvalid, .irq, .bus);

  function automatic logic [7:0] msg_byte(int round, int ecu, int k);
    return 8'(round * 71 + ecu * 37 + k * 13 + 5 + (k * k) / 3);
  endfunction

  // st/et scaled by (1 + 0.15 %), rounded up
  function automatic int scaled(int t);
    return (t * 10015 + 9999) / 10000;
  endfunction
  function automatic int st_a(int s);
    int t = TP;
    for (int j = 0; j < s; j++) t += 10 * MLEN[j] + 4 + TP;
    return t;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
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

    task automatic rd(logic [7:0] a, output logic [31:0] d);
      @(negedge clk[i]);
      io_req[i] <= '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
      @(negedge clk[i]);
      io_req[i] <= '0;
      d = io_rdata[i];
    endtask

    task automatic load_msg(int round);
      logic [31:0] w;
      wr(A_CMD, 32'h1 << CMD_CLR_SBP);
      for (int k = 0; k < MLEN[i]; k += 4) begin
        for (int b = 0; b < 4; b++) w[8*b +: 8] = msg_byte(round, i + 1, k + b);
        wr(A_DATA, w);
      end
    endtask

    initial begin
      logic [31:0] d;
      io_req[i] = '0;
      rst_n[i]  = 1'b0;
      repeat (3) @(posedge clk[i]);
      rst_n[i] <= 1'b1;
      // configuration: u, schedule, send buffer, ns last
      wr(A_U, 32'(i + 1));
      for (int s = 0; s < NS; s++) begin
        wr({A_ECU, 5'(s)},    32'(s + 1));
        wr({A_ST, 5'(s)},     32'(scaled(st_a(s))));
        wr({A_MLEN, 5'(s)},   32'(MLEN[s]));
        wr({A_WAKEUP, 5'(s)}, 32'(scaled(st_a(s) + 10 * MLEN[s] + 4) + 3));
      end
      load_msg(0);
      wr(A_NS, NS);
      rd(A_U, d);
      check(d == 32'(i + 1), "u readback");
      for (int r = 0; r < ROUNDS; r++) begin
        for (int s = 0; s < NS; s++) begin
          while (!irq[i]) @(posedge clk[i]);
          wr(A_CMD, (32'h1 << CMD_CLR_IRQ) | (32'h1 << CMD_CLR_RBP));
          rd(A_CMD, d);
          check(d[15:8] == 8'((s + 1) % NS), "slot index after wakeup");
          check(d[1:0] == 2'b00 && d[4] == 1'b0, "interface idle, no error");
          for (int k = 0; k < MLEN[s]; k += 4) begin
            rd(A_DATA, d);
            for (int b = 0; b < 4 && k + b < MLEN[s]; b++)
              check(d[8*b +: 8] == msg_byte(r, s + 1, k + b),
                    $sformatf("ecu %0d round %0d slot %0d byte %0d", i, r, s, k + b));
          end
          if (s == i) load_msg(r + 1);
        end
      end
      done_ecus++;
    end

    // monitors
    assign ti_mon[i] = dut.g_ecu[i].u_if.ti;
    int unsigned t_start, tx_cycles;
    bit          tx_on = 0;
    bit          wake_q = 0;
    always @(posedge clk[i]) if (rst_n[i]) begin
      if (dut.g_ecu[i].u_if.tx_start) begin
        n_tx++;
        t_start = $time;
      end
      if (dut.g_ecu[i].u_if.u_tx.bus_en) begin
        tx_cycles = tx_on ? tx_cycles + 1 : 1;
        tx_on = 1;
      end else if (tx_on) begin
        tx_on = 0;
        check(tx_cycles == 8 * (4 + 10 * MLEN[i]), "frame length on the bus");
      end
      if (dut.g_ecu[i].u_if.u_rx.sync) begin
        if (dut.g_ecu[i].u_if.u_rx.u_fsm.state == POS_IDLE) n_sync_tss++;
        else begin
          n_sync_bss++;
          if (dut.g_ecu[i].u_if.u_rx.u_strobe.cnt_q != 3'd0) n_drift++;
        end
      end
      if (dut.g_ecu[i].u_if.timer_clr) n_clr++;
      if (dut.g_ecu[i].u_if.wakeup) n_wakeup++;
      // the slot's frame is over on this ECU once irq shows the wakeup (in
      // the last slot the wakeup comes with the timer clear, in the frame's
      // final cycle, and the interface is idle one cycle later)
      if (wake_q && run)
        check(!dut.g_ecu[i].u_if.rx_busy && !dut.g_ecu[i].u_if.tx_busy,
              "interface idle when the wakeup interrupt shows");
      wake_q <= dut.g_ecu[i].u_if.wakeup;
      if (dut.g_ecu[i].u_if.rx_force_idle) n_idle++;
      if (dut.g_ecu[i].u_if.dp_wr) n_dp_wr++;
      if (dut.g_ecu[i].u_if.dp_rd) n_dp_rd++;
      if (dut.g_ecu[i].u_if.rx_err) begin check(0, "framing error"); $display("ecu %0d sigma %0d ti %0d st %0d", i, dut.g_ecu[i].u_if.sigma, dut.g_ecu[i].u_if.ti, dut.g_ecu[i].u_if.slot.st); end
    end
  end

  bit run = 0;   // bus checks start once every ECU is out of reset
  initial #(100_000) run = 1;

  // framing bits of a reconstructed frame (the data bits are checked
  // through the receive buffers): length, TSS FSS, BSS before every byte,
  // FES; bit n-1 is the first bit on the bus
  function automatic bit frame_shape_ok(logic [4+10*4*64-1:0] f, int n, int exp_n);
    bit ok = (n == exp_n) && f[n-1 -: 2] == 2'b01 && f[1:0] == 2'b01;
    for (int k = 0; k < (n - 4) / 10; k++) ok &= (f[n-3-10*k -: 2] == 2'b10);
    return ok;
  endfunction

  // latency: each receiver's frame end against the sender's start
  longint t_tx0;
  int     cur_len;
  for (genvar i = 0; i < N; i++) begin : g_lat
    always @(posedge clk[i]) if (dut.g_ecu[i].u_if.tx_start) begin
      t_tx0   = $time;
      cur_len = 8 * (4 + 10 * MLEN[i]);
    end
    always @(posedge clk[i]) if (dut.g_ecu[i].u_if.rx_done) begin
      // Theorem bound ceil((1+d)L)+8 receiver cycles, plus the sender's
      // start-to-drive edge and the done register: 2 cycles
      check(($time - t_tx0) <= longint'((cur_len * 10015 / 10000 + 8 + 2) * PER[i]),
            "receive latency");
      if (run) begin
        check(frame_shape_ok(dut.g_ecu[i].u_if.rx_fhat, int'(dut.g_ecu[i].u_if.rx_fhat_len),
                             cur_len / 8), "reconstructed frame has the frame format");
        n_fhat++;
      end
    end
  end

  // bus contention and timer agreement after clock synchronisation
  always @(dut.drv_en) if (run) check($countones(dut.drv_en) <= 1, "one driver at a time");
  // frames of adjacent slots at least 8 cycles apart on the bus
  longint t_release = -1;
  int     n_gap = 0;
  always @(dut.drv_en) if (run) begin
    if (dut.drv_en == '0) t_release = $time;
    else if (t_release >= 0) begin
      check($time - t_release >= 8 * 10000, "gap between frames");
      n_gap++;
    end
  end
  bit synced = 0;   // set once the first clock synchronisation is over
  always @(posedge clk[0]) if (dut.g_ecu[0].u_if.timer_clr) begin
    fork begin
      repeat (16) @(posedge clk[0]);
      for (int j = 0; j < N; j++)
        check(ti_mon[j] <= 16'd2 && ti_mon[j] + 16'd1 >= ti_mon[0],
              "timers agree after clock sync");
      synced = 1;
    end join_none
  end
  // between synchronisations every timer stays within T*d + 2 ticks of
  // ECU 0's timer T (d = 0.15 %); right around a clear (either timer below
  // 2) the two may sit on different sides of it, so those cycles are skipped
  int n_drift_chk = 0;
  always @(posedge clk[0]) if (synced && ti_mon[0] >= 16'd2) begin
    for (int j = 1; j < N; j++) if (ti_mon[j] >= 16'd2) begin
      check(int'(ti_mon[j]) - int'(ti_mon[0]) <= int'(ti_mon[0]) * 15 / 10000 + 2 &&
            int'(ti_mon[0]) - int'(ti_mon[j]) <= int'(ti_mon[0]) * 15 / 10000 + 2,
            "timer drift bound");
      n_drift_chk++;
    end
  end

  initial begin
    wait (done_ecus == N);
    repeat (20) @(posedge clk[0]);
    check(n_tx == NS * ROUNDS, "number of frames sent");
    check(n_clr == N * ROUNDS, "timer clears");
    check(n_wakeup == N * NS * ROUNDS, "wakeup interrupts");
    $display("mechanisms: tx=%0d sync_tss=%0d sync_bss=%0d drift_corr=%0d clr=%0d wakeup=%0d force_idle=%0d dp_wr=%0d dp_rd=%0d frames_rebuilt=%0d",
             n_tx, n_sync_tss, n_sync_bss, n_drift, n_clr, n_wakeup, n_idle, n_dp_wr, n_dp_rd, n_fhat);
    check(n_sync_tss > 0, "sync at TSS happened");
    check(n_sync_bss > 0, "sync at BSS happened");
    check(n_drift > 0, "drift correction happened");
    check(n_idle > 0, "forced idle happened");
    check(n_dp_wr > 0 && n_dp_rd > 0, "data port used");
    // the sender's own receiver listens too, except that in the last slot
    // its timer clear ends the frame early
    check(n_fhat >= (N - 1) * NS * ROUNDS, "frames reconstructed by every receiver");
    check(n_drift_chk > 0, "timer drift bound checked");
    $display("timer drift bound checked %0d times", n_drift_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(64'd400_000_000);   // 40000 nominal cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
