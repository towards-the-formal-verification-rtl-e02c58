// Reconstructed frame register f^ of the serial receiver.
//
// At every strobe the voted bus value v is shifted in at the right, so that
// after a frame the low fhat_len bits of fhat, read from bit fhat_len-1 down
// to bit 0, are the frame bits in the order in which they were sent.  A
// strobe that sees v = 0 while the automaton is idle is the TSS sample: it
// starts a new frame, so fhat becomes that single 0 bit and fhat_len = 1.
// Later strobes, until the automaton is idle again, append one bit each.
// Strobes in idle with v = 1 (an idle line) are not recorded.
// Interface: strobe, v and idle come from strobe_gen, maj_voter and rx_fsm
// in the same cycle; fhat and fhat_len are registers, updated one cycle
// after the strobe.  When a frame is longer than F_BITS, fhat keeps the
// newest F_BITS bits and fhat_len stops at F_BITS.
// Appending v at each strobe follows the specification of the receiver.
// Clearing the register at each TSS, so that it holds one frame, and the
// bounded width are design choices.  The bus interface stores bytes from
// rx_fsm, so this register serves for checking the received frame.
module frame_recon #(
  parameter int unsigned F_BITS = 2564,
  localparam int unsigned LW    = $clog2(F_BITS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strobe,
  input  logic              v,
  input  logic              idle,
  output logic [F_BITS-1:0] fhat,
  output logic [LW-1:0]     fhat_len
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fhat     <= '0;
      fhat_len <= '0;
    end else if (strobe && idle && !v) begin
      fhat     <= '0;
      fhat_len <= LW'(1);
    end else if (strobe && !idle) begin
      fhat     <= {fhat[F_BITS-2:0], v};
      if (fhat_len != LW'(F_BITS)) fhat_len <= fhat_len + LW'(1);
    end
  end
endmodule
