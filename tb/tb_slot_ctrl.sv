// Test of the slot sequencer with a timer model in the test.  A 3-slot
// schedule is run for four rounds; in rounds 0 and 1 the ECU sends in
// slot 0 and only receives in the last slot, in rounds 2 and 3 it is
// also the sender of the last slot.  Checked per slot: tx_start (only for
// its own slots) in the first cycle with ti = st(s), and nowhere else;
// wakeup and force_idle in the first cycle with ti = wakeup(s); the
// slot index; in the last slot the timer clear one cycle after rx_done
// (ti = 0 three cycles after the sampling strobe) or in the cycle of
// tx_done, with the last slot's wakeup, and the return to slot 0.  Also
// that nothing happens while ns = 0.
`timescale 1ns/1ps
module tb_slot_ctrl;
  import fr_pkg::*;
  localparam int NS_MAX = 16;
  logic clk = 0, rst_n = 0;
  logic [TI_W-1:0] ti;
  logic [2:0] pre;
  logic [7:0] cfg_u = 8'd3;
  logic [4:0] cfg_ns = 0;
  slot_cfg_t tab [NS_MAX], slot;
  logic tx_done = 0, rx_done = 0;
  logic [3:0] sigma;
  logic tx_start, rx_force_idle, timer_clr, wakeup, active;
  int checks = 0, failures = 0;
  int n_start, n_idle, n_wake, n_clr;

  slot_ctrl #(.NS_MAX(NS_MAX)) dut (.*);
  assign slot = tab[sigma];
  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin ti <= '0; pre <= '0; end
    else if (timer_clr) begin ti <= '0; pre <= '0; end
    else begin pre <= pre + 3'd1; if (pre == 3'd7) ti <= ti + 1'b1; end

  always @(posedge clk) begin
    n_start += int'(tx_start);
    n_idle  += int'(rx_force_idle);
    n_wake  += int'(wakeup);
    n_clr   += int'(timer_clr);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int s = 0; s < NS_MAX; s++) tab[s] = '0;
    tab[0] = '{ecu: 8'd3, st: 16'd10, mlen: 16'd4, wakeup: 16'd60};
    tab[1] = '{ecu: 8'd1, st: 16'd70, mlen: 16'd2, wakeup: 16'd100};
    tab[2] = '{ecu: 8'd2, st: 16'd110, mlen: 16'd2, wakeup: 16'd200};
    #12 rst_n = 1;
    repeat (40) @(negedge clk);
    chk(n_start == 0 && n_idle == 0 && n_wake == 0 && n_clr == 0, "quiet while ns = 0");
    cfg_ns = 5'd3;
    for (int r = 0; r < 4; r++) begin
      if (r == 2) tab[2].ecu = 8'd3;
      n_start = 0; n_idle = 0; n_wake = 0; n_clr = 0;
      for (int s = 0; s < 3; s++) begin
        @(negedge clk);
        while (ti != tab[s].st) begin
          chk(!tx_start, "no early slot start");
          @(negedge clk);
        end
        chk(tx_start == (tab[s].ecu == cfg_u) && sigma == 4'(s), "slot start");
        @(negedge clk);
        chk(!tx_start && active, "slot start is one pulse");
        if (s < 2) begin
          while (ti != tab[s].wakeup) begin
            chk(!wakeup && !rx_force_idle, "no early wakeup");
            @(negedge clk);
          end
          chk(wakeup && rx_force_idle, "wakeup at wakeup(s)");
          @(negedge clk);
          chk(sigma == 4'(s + 1) && !wakeup, "next slot");
        end else begin
          while (ti != tab[s].st + 16'd20) @(negedge clk);
          if (tab[s].ecu == cfg_u) begin
            tx_done = 1;
            #1 chk(timer_clr && wakeup && rx_force_idle, "clear on own FES[0]");
            @(negedge clk);
            tx_done = 0;
          end else begin
            tx_done = 1;   // another ECU's sender event must be ignored
            #1 chk(!timer_clr, "tx_done ignored when not sending");
            @(negedge clk);
            tx_done = 0;
            rx_done = 1;
            #1 chk(!timer_clr, "no clear with rx_done");
            @(negedge clk);
            rx_done = 0;
            #1 chk(timer_clr && wakeup && rx_force_idle, "clear one cycle after rx_done");
            @(negedge clk);
          end
          chk(ti == 0 && sigma == 0 && !timer_clr, "round restarts");
        end
      end
      chk(n_start == ((r >= 2) ? 2 : 1), "starts per round");
      chk(n_idle == 3 && n_wake == 3 && n_clr == 1, "events per round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
