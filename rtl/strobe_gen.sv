// Strobe counter of the receiver (low-level clock synchronisation).
//
// A 3-bit counter runs modulo 8, one step per clock, so a strobe (sample
// point) comes every eight cycles, once per frame bit.  When the receiver
// sees an expected falling edge it raises sync; sync clears the count in the
// same cycle, so the next strobe comes exactly four cycles later, in the
// middle of the bit.  This keeps the sample points centred despite drift
// between the sender's and the receiver's clock.
// Interface: cnt is the count in the current cycle (0 while sync is high);
// strobe = (cnt == 4).  The register holds cnt+1 for the next cycle.
// Counter width, strobe point and reset by sync follow the specification;
// clearing in the same cycle is the reading that puts the strobe 4 cycles
// after the sync, as the interface's timing requires.
module strobe_gen
  import fr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  output logic       strobe,
  output logic [2:0] cnt
);
  logic [2:0] cnt_q;

  always_comb begin
    cnt    = sync ? 3'd0 : cnt_q;
    strobe = (cnt == 3'(STROBE_AT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= 3'd0;
    else        cnt_q <= cnt + 3'd1;   // wraps modulo 8
  end
endmodule
