// Serial receiver: data path and automaton.
//
// bus_i -> rx_sync (R, R^) -> maj_voter (sh[0:3], majority v) -> rx_fsm,
// with strobe_gen placing a sample point every eight cycles.  sync from the
// automaton re-centres the sample points on every expected falling edge
// (start of TSS and of each BSS[0]), at most 11 frame bits apart, which
// keeps sender and receiver aligned despite clock drift.
// Latency: a bus edge reaches v 3 to 4 cycles later (two synchroniser
// stages plus majority of five); the strobe falls 4 cycles after sync.
// frame_recon shifts v in at every strobe and so rebuilds the whole frame
// (fhat, fhat_len), while rx_fsm hands out the data bytes one at a time.
// The data path follows the specification of the receiver; the byte
// outputs next to the frame register are a design choice.
module serial_rx
  import fr_pkg::*;
#(
  parameter int unsigned LEN_W  = 9,
  parameter int unsigned F_BITS = 2564,
  localparam int unsigned FL_W  = $clog2(F_BITS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_i,
  input  logic             force_idle,
  output logic [7:0]       byte_o,
  output logic             byte_valid,
  output logic [LEN_W-1:0] byte_idx,
  output logic             frame_done,
  output logic             frame_err,
  output logic             busy,
  output logic             sync,
  output logic             strobe,
  output logic [F_BITS-1:0] fhat,
  output logic [FL_W-1:0]  fhat_len
);
  logic       r, rhat, v;
  logic [3:0] sh;
  logic [2:0] cnt;
  frame_pos_t state;

  rx_sync u_sync (.clk, .rst_n, .bus_i, .r, .rhat);
  maj_voter u_vote (.clk, .rst_n, .rhat, .v, .sh);
  strobe_gen u_strobe (.clk, .rst_n, .sync, .strobe, .cnt);
  rx_fsm #(.LEN_W(LEN_W)) u_fsm (
    .clk, .rst_n, .force_idle, .v, .strobe, .sync, .state,
    .byte_o, .byte_valid, .byte_idx, .frame_done, .frame_err
  );

  frame_recon #(.F_BITS(F_BITS)) u_fhat (
    .clk, .rst_n, .strobe, .v, .idle(state == POS_IDLE), .fhat, .fhat_len
  );

  assign busy = (state != POS_IDLE);
endmodule
