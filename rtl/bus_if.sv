// Bus interface of one ECU for a time-triggered, FlexRay-like bus.
//
// The processor sees a set of 32-bit I/O ports:
//   0x00 data port  write: sb[sbp] <= data, sbp++   read: rb[rbp], rbp++
//   0x01 command    write: bit0 sbp<=0, bit1 rbp<=0, bit2 clear interrupt,
//                          bit3 clear frame-error flag
//        status     read:  bit0 sending, bit1 receiving, bit2 interrupt
//                          pending, bit3 bus phase of the slot, bit4 a
//                          framing error was seen, 15:8 current slot
//   0x02 u, 0x03 ns, 0x40+s ecu(s), 0x60+s st(s), 0x80+s mlen(s),
//   0xA0+s wakeup(s)   configuration (see sched_regs)
// Communication runs in bus rounds of ns slots.  The timer ti (one tick per
// eight cycles) and the slot sequencer decide when the sender transmits the
// first mlen(s) bytes of the send buffer sb; in every slot the receiver of
// every ECU, including the sender's own, stores the frame's bytes in the
// receive buffer rb from word 0 up (byte i in word i/4, bits 8*(i%4)+:8).
// The wakeup interrupt tells the processor that the slot's transmission is
// over and the data port may be used until the next slot starts.  The last
// frame of a round resets the timers of all ECUs (high-level clock
// synchronisation).  Until ns is written (non-zero) the timer stands at 0,
// so writing ns last starts the first round.
// Timing: data-port reads return io_rdata with io_rvalid one cycle after
// io_req.re.  The register map and the port timing are this design's
// choices; the data port with auto-incrementing pointers, the buffers, the
// schedule registers, timer and synchronisation follow the interface this
// RTL implements.
module bus_if
  import fr_pkg::*;
#(
  parameter int unsigned SB_WORDS = 64,
  parameter int unsigned NS_MAX   = 16,
  localparam int unsigned AW      = $clog2(SB_WORDS),
  localparam int unsigned LEN_W   = $clog2(4 * SB_WORDS) + 1,
  localparam int unsigned SW      = $clog2(NS_MAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  io_req_t         io_req,
  output logic [IO_W-1:0] io_rdata,
  output logic            io_rvalid,
  output logic            irq,
  input  logic            bus_i,
  output logic            bus_o,
  output logic            bus_en
);
  // timer and schedule
  logic [TI_W-1:0] ti;
  logic            tick, timer_clr;
  logic [7:0]      cfg_u;
  logic [SW:0]     cfg_ns;
  slot_cfg_t       slot;
  logic [SW-1:0]   sigma;
  logic            tx_start, rx_force_idle, wakeup, slot_active;

  // sender / receiver
  logic [LEN_W-1:0] tx_addr, rx_idx;
  logic [7:0]       tx_byte, rx_byte;
  logic             tx_busy, tx_done;
  logic             rx_valid, rx_done, rx_err, rx_busy, rx_sync_ev, rx_strobe;

  // buffers and pointers
  logic [AW-1:0] sbp, rbp;
  logic [31:0]   sb_rdata, rb_rdata;
  logic          dp_wr, dp_rd, cmd_wr;
  logic          err_flag;

  // the timer stands at 0 until a schedule is configured (ns != 0)
  ecu_timer u_timer (.clk, .rst_n, .clr(timer_clr || cfg_ns == '0), .ti, .tick);

  sched_regs #(.NS_MAX(NS_MAX)) u_cfg (
    .clk, .rst_n, .we(io_req.we), .addr(io_req.addr), .wdata(io_req.wdata),
    .sigma, .cfg_u, .cfg_ns, .slot
  );

  slot_ctrl #(.NS_MAX(NS_MAX)) u_seq (
    .clk, .rst_n, .ti, .cfg_u, .cfg_ns, .slot, .tx_done, .rx_done,
    .sigma, .tx_start, .rx_force_idle, .timer_clr, .wakeup,
    .active(slot_active)
  );

  serial_tx #(.LEN_W(LEN_W)) u_tx (
    .clk, .rst_n, .start(tx_start), .len(slot.mlen[LEN_W-1:0]),
    .rd_addr(tx_addr), .rd_byte(tx_byte), .bus_o, .bus_en,
    .busy(tx_busy), .done(tx_done)
  );

  // frame register of the receiver, sized for the longest frame the buffers
  // allow; the processor sees the bytes, the register is there for checking
  localparam int unsigned F_BITS = 4 + 10 * 4 * SB_WORDS;
  logic [F_BITS-1:0]              rx_fhat;
  logic [$clog2(F_BITS + 1)-1:0] rx_fhat_len;

  serial_rx #(.LEN_W(LEN_W), .F_BITS(F_BITS)) u_rx (
    .clk, .rst_n, .bus_i, .force_idle(rx_force_idle),
    .byte_o(rx_byte), .byte_valid(rx_valid), .byte_idx(rx_idx),
    .frame_done(rx_done), .frame_err(rx_err), .busy(rx_busy),
    .sync(rx_sync_ev), .strobe(rx_strobe), .fhat(rx_fhat), .fhat_len(rx_fhat_len)
  );

  // send buffer: written through the data port, read byte-wise by the sender
  msg_buffer #(.WORDS(SB_WORDS)) u_sb (
    .clk, .we(dp_wr), .waddr(sbp), .wbe(4'hF), .wdata(io_req.wdata),
    .raddr(tx_addr[AW+1:2]), .rdata(sb_rdata)
  );
  assign tx_byte = sb_rdata[8*tx_addr[1:0] +: 8];

  // receive buffer: written byte-wise by the receiver, read through the port
  msg_buffer #(.WORDS(SB_WORDS)) u_rb (
    .clk, .we(rx_valid), .waddr(rx_idx[AW+1:2]),
    .wbe(4'b0001 << rx_idx[1:0]), .wdata({4{rx_byte}}),
    .raddr(rbp), .rdata(rb_rdata)
  );

  assign dp_wr  = io_req.we && io_req.addr == A_DATA;
  assign dp_rd  = io_req.re && io_req.addr == A_DATA;
  assign cmd_wr = io_req.we && io_req.addr == A_CMD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sbp       <= '0;
      rbp       <= '0;
      irq       <= 1'b0;
      err_flag  <= 1'b0;
      io_rdata  <= '0;
      io_rvalid <= 1'b0;
    end else begin
      io_rvalid <= io_req.re;
      if (dp_wr) sbp <= sbp + AW'(1);
      if (dp_rd) rbp <= rbp + AW'(1);
      if (cmd_wr && io_req.wdata[CMD_CLR_SBP]) sbp <= '0;
      if (cmd_wr && io_req.wdata[CMD_CLR_RBP]) rbp <= '0;
      if (wakeup) irq <= 1'b1;
      else if (cmd_wr && io_req.wdata[CMD_CLR_IRQ]) irq <= 1'b0;
      if (rx_err) err_flag <= 1'b1;
      else if (cmd_wr && io_req.wdata[CMD_CLR_ERR]) err_flag <= 1'b0;
      if (io_req.re) begin
        unique case (io_req.addr)
          A_DATA:  io_rdata <= rb_rdata;
          A_CMD:   io_rdata <= {16'd0, 8'(sigma), 3'd0, err_flag,
                                slot_active, irq, rx_busy, tx_busy};
          A_U:     io_rdata <= {24'd0, cfg_u};
          A_NS:    io_rdata <= 32'(cfg_ns);
          default: io_rdata <= '0;
        endcase
      end
    end
  end

  // The processor must not use the data port while a frame is on the wire.
  a_no_dp_during_frame : assert property (
    @(posedge clk) disable iff (!rst_n) (dp_wr || dp_rd) |-> !(tx_busy || rx_busy)
  ) else $error("data port used while the interface sends or receives");
endmodule
