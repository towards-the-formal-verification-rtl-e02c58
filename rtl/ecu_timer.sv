// ECU timer ti.
//
// A divide-by-8 prescaler lets ti advance once every eight clock cycles
// (one frame bit time).  clr, raised by the high-level clock
// synchronisation at the end of a bus round, restarts both ti and the
// prescaler at 0 so that all ECUs count from the same point.
// Interface: tick is high in the cycle before ti increments.
// The divide-by-8 rate and the clear follow the specification; the 16-bit
// width and clearing the prescaler too are this design's choices.
module ecu_timer
  import fr_pkg::*;
#(
  parameter int unsigned PRESCALE = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  output logic [TI_W-1:0] ti,
  output logic            tick
);
  localparam int unsigned PW = $clog2(PRESCALE);
  logic [PW-1:0] pre;

  assign tick = (pre == PW'(PRESCALE - 1)) && !clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
      ti  <= '0;
    end else if (clr) begin
      pre <= '0;
      ti  <= '0;
    end else begin
      pre <= (pre == PW'(PRESCALE - 1)) ? '0 : pre + PW'(1);
      if (tick) ti <= ti + TI_W'(1);
    end
  end
endmodule
