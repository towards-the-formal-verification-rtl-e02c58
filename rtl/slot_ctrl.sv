// Slot sequencer and high-level clock synchronisation.
//
// Walks through the ns slots of a bus round using the local timer ti:
//  * WAIT_ST: when ti = st(s) and this ECU is ecu(s), the sender is
//    started for mlen(s) bytes.
//  * ACTIVE:  when ti = wakeup(s) the wakeup interrupt is raised (the
//    processor may now use the data port until st(s+1)) and the next slot
//    begins: the receiver automaton is forced to idle here.  In the last
//    slot the sequencer instead waits for the clock synchronisation.
//  * Clock synchronisation, last slot only: the sending ECU clears its timer
//    right after driving the last copy of FES[0] (tx_done); every other ECU
//    clears it so that ti = 0 holds SYNC_DLY cycles after the strobe that
//    sampled FES[0] (rx_done comes one cycle after that strobe).  The clear
//    ends the round: slot 0 follows, the receiver is forced to idle, and the
//    last slot's wakeup interrupt is raised now if its wakeup time had not
//    yet been reached.
// Forcing the receiver idle when a slot begins, i.e. at the previous slot's
// wakeup and not at st(s), keeps a receiver whose timer lags the sender's
// by a few cycles from aborting a frame that has already started.
// While ns = 0 (no schedule configured yet) the sequencer stays in slot 0
// and does nothing, so ns should be written last at startup.
// The events on st, wakeup and the clock synchronisation follow the bus
// schedule described for this interface; closing the last slot with the
// timer clear is this design's reading, so st(0) should leave the
// processor its window after the last slot.
module slot_ctrl
  import fr_pkg::*;
#(
  parameter int unsigned NS_MAX   = 16,
  parameter int unsigned SYNC_DLY = 3,
  localparam int unsigned SW      = $clog2(NS_MAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TI_W-1:0] ti,
  input  logic [7:0]      cfg_u,
  input  logic [SW:0]     cfg_ns,
  input  slot_cfg_t       slot,
  input  logic            tx_done,
  input  logic            rx_done,
  output logic [SW-1:0]   sigma,
  output logic            tx_start,
  output logic            rx_force_idle,
  output logic            timer_clr,
  output logic            wakeup,
  output logic            active      // between st(s) and wakeup(s)
);
  typedef enum logic [1:0] {S_WAIT_ST, S_ACTIVE, S_LAST} seq_t;
  seq_t seq;

  localparam int unsigned DW = $clog2(SYNC_DLY + 1);
  logic [DW-1:0] dly;       // counts down to the receiver's timer clear
  logic          dly_run;
  logic          last_slot, sender, at_st, at_wakeup;

  initial assert (SYNC_DLY >= 3) else $error("SYNC_DLY must be at least 3");

  assign last_slot = (32'(sigma) + 1 >= 32'(cfg_ns));
  assign sender    = (slot.ecu == cfg_u);
  assign at_st     = (seq == S_WAIT_ST) && (ti == slot.st) && (cfg_ns != '0);
  assign at_wakeup = (seq == S_ACTIVE)  && (ti == slot.wakeup);
  assign active    = (seq == S_ACTIVE);

  assign tx_start      = at_st && sender;
  assign rx_force_idle = at_wakeup || timer_clr;
  assign timer_clr     = (seq != S_WAIT_ST) && last_slot &&
                         (sender ? tx_done : (dly_run && dly == '0));
  assign wakeup        = (at_wakeup && !timer_clr) ||
                         (timer_clr && seq == S_ACTIVE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq     <= S_WAIT_ST;
      sigma   <= '0;
      dly     <= '0;
      dly_run <= 1'b0;
    end else begin
      // receiver side: delay from the FES[0] sample to the timer clear
      if (rx_done && !sender && last_slot && seq != S_WAIT_ST) begin
        dly_run <= 1'b1;
        dly     <= DW'(SYNC_DLY - 3);
      end else if (dly_run) begin
        if (dly == '0) dly_run <= 1'b0;
        else           dly     <= dly - DW'(1);
      end

      if (timer_clr) begin
        seq   <= S_WAIT_ST;
        sigma <= '0;
      end else begin
        unique case (seq)
          S_WAIT_ST: if (at_st) seq <= S_ACTIVE;
          S_ACTIVE:  if (at_wakeup) begin
            if (last_slot) seq <= S_LAST;
            else begin
              seq   <= S_WAIT_ST;
              sigma <= sigma + SW'(1);
            end
          end
          default: ;   // S_LAST: wait for the clock synchronisation
        endcase
      end
    end
  end
endmodule
