// Bus input synchroniser of the receiver.
//
// The bus is driven from another ECU's clock, so setup and hold times of the
// first register R can be violated and R may go metastable.  R is therefore
// copied into a second register R^ (rhat) on the next edge of the same
// clock; only rhat is used by the rest of the receiver.  Both registers come
// out of reset holding 1, the idle level of the bus.
// Timing: rhat shows the bus value sampled two rising edges earlier.
// The two-stage structure and the reset value follow the interface's
// specification.
module rx_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic bus_i,
  output logic r,
  output logic rhat
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= 1'b1;
      rhat <= 1'b1;
    end else begin
      r    <= bus_i;
      rhat <= r;
    end
  end
endmodule
