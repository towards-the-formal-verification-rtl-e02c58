// Test of one ECU bus interface (u = 1) together with a second sender in
// the test (ECU 5, a serial_tx reading the test's own message memory) on a
// shared open-collector line, both on the same clock.  Schedule: slot 0
// sent by this ECU (10 bytes), slot 1 (the last) by ECU 5 (7 bytes).
// Over three rounds the test checks, through the processor port only:
// configuration read-back, the status register (slot index, idle, error
// flag), the wakeup interrupt and its clearing, that the receive buffer
// holds this ECU's own frame after slot 0 and ECU 5's frame after slot 1,
// the auto-incrementing data port and the pointer-clearing commands, and
// a new send message per round.  It also checks that the timer is cleared
// by the clock synchronisation 3 cycles after the strobe that sampled
// FES[0] of the last frame, and the read latency of one cycle.
`timescale 1ns/1ps
module tb_bus_if;
  import fr_pkg::*;
  localparam int L0 = 10, L1 = 7;
  logic clk = 0, rst_n = 0;
  io_req_t io_req;
  logic [31:0] io_rdata;
  logic io_rvalid, irq, bus, bus_o, bus_en;
  // partner sender
  logic p_start = 0, p_o, p_en, p_busy, p_done;
  logic [8:0] p_addr;
  logic [7:0] p_mem [256];
  int checks = 0, failures = 0;
  longint strobe_fes_cyc, cyc = 0;

  bus_if dut (.clk, .rst_n, .io_req, .io_rdata, .io_rvalid, .irq,
              .bus_i(bus), .bus_o, .bus_en);
  serial_tx #(.LEN_W(9)) u_partner (.clk, .rst_n, .start(p_start), .len(9'(L1)),
    .rd_addr(p_addr), .rd_byte(p_mem[p_addr[7:0]]), .bus_o(p_o), .bus_en(p_en),
    .busy(p_busy), .done(p_done));
  flexray_bus #(.N(2)) u_bus (.en({p_en, bus_en}), .val({p_o, bus_o}), .bus);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [7:0] own_byte(int r, int k);
    return 8'(r * 29 + k * 17 + 3);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    io_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk);
    io_req = '0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    io_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(posedge clk);
    #1 chk(io_rvalid, "read valid one cycle later");
    @(negedge clk);
    io_req = '0;
    d = io_rdata;
  endtask

  task automatic load(int r);
    wr(A_CMD, 32'h1);
    for (int k = 0; k < L0; k += 4)
      wr(A_DATA, {own_byte(r, k + 3), own_byte(r, k + 2), own_byte(r, k + 1), own_byte(r, k)});
  endtask

  task automatic check_rb(int len, bit own, int r);
    logic [31:0] d;
    logic [7:0] e;
    wr(A_CMD, 32'h2);
    for (int k = 0; k < len; k += 4) begin
      rd(A_DATA, d);
      for (int b = 0; b < 4 && k + b < len; b++) begin
        e = own ? own_byte(r, k + b) : p_mem[k + b];
        chk(d[8*b +: 8] == e, $sformatf("round %0d rb byte %0d", r, k + b));
      end
    end
  endtask

  // partner starts in its slot, like ECU 5's sequencer would
  always @(posedge clk)
    p_start <= dut.u_seq.seq == 2'd0 && dut.sigma == 1 && dut.ti == dut.slot.st
               && dut.cfg_ns != 0;

  // timer clear timing: ti = 0 three cycles after the FES[0] strobe
  // (sampled at the falling edge, where cyc numbers the current cycle)
  always @(negedge clk) begin
    if (dut.u_rx.strobe && dut.u_rx.u_fsm.state == POS_FES0 && dut.sigma == 1)
      strobe_fes_cyc = cyc;
    if (dut.timer_clr) begin
      chk(cyc == strobe_fes_cyc + 2, "timer clear 2 cycles after the FES[0] strobe");
      fork begin
        @(negedge clk);
        chk(dut.ti == 0 && cyc == strobe_fes_cyc + 3, "ti = 0 three cycles after the FES[0] strobe");
      end join_none
    end
  end

  initial begin
    logic [31:0] d;
    io_req = '0;
    for (int k = 0; k < 256; k++) p_mem[k] = 8'($urandom);
    #22 rst_n = 1;
    wr(A_U, 1);
    wr({A_ECU, 5'd0}, 1);  wr({A_ST, 5'd0}, 30);  wr({A_MLEN, 5'd0}, L0); wr({A_WAKEUP, 5'd0}, 30 + 104 + 4 + 3);
    wr({A_ECU, 5'd1}, 5);  wr({A_ST, 5'd1}, 160); wr({A_MLEN, 5'd1}, L1); wr({A_WAKEUP, 5'd1}, 160 + 74 + 6);
    load(0);
    wr(A_NS, 2);
    rd(A_U, d);  chk(d == 1, "u read-back");
    rd(A_NS, d); chk(d == 2, "ns read-back");
    rd(A_CMD, d); chk(d[2] == 0, "no interrupt yet");
    for (int r = 0; r < 3; r++) begin
      // slot 0: own frame
      wait (irq);
      rd(A_CMD, d);
      chk(d[15:8] == 1 && d[2] && d[1:0] == 0 && !d[4], "status after slot 0");
      wr(A_CMD, 32'h4);
      rd(A_CMD, d); chk(!d[2], "interrupt cleared");
      check_rb(L0, 1, r);
      load(r + 1);
      for (int k = 0; k < 256; k++) p_mem[k] = 8'($urandom);
      // slot 1: partner's frame, ends the round with the clock sync
      wait (irq);
      rd(A_CMD, d);
      chk(d[15:8] == 0 && d[1:0] == 0 && !d[4], "status after slot 1");
      wr(A_CMD, 32'h4);
      check_rb(L1, 0, r);
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
