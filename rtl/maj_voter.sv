// Majority filter of the receiver.
//
// The last four values of the synchronised bus rhat are kept in the shift
// register sh[0:3] (sh[0] the newest).  The voted signal v is the majority
// of the five values rhat, sh[0..3]: v is 1 when at least three of them are
// 1.  Because every frame bit is on the bus for eight cycles, v follows
// each bit for at least seven cycles even if one sample next to a bit
// boundary was taken wrongly.  After reset sh = 1111 (idle bus).
// Timing: v is combinational from rhat and sh; sh shifts every cycle.
// History length, vote and reset value follow the specification; making
// v combinational (not registered) is this design's choice.
module maj_voter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rhat,
  output logic       v,
  output logic [3:0] sh
);
  logic [2:0] ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= 4'b1111;
    else        sh <= {sh[2:0], rhat};
  end

  always_comb begin
    ones = 3'(rhat) + 3'(sh[0]) + 3'(sh[1]) + 3'(sh[2]) + 3'(sh[3]);
    v    = (ones >= 3'd3);
  end
endmodule
