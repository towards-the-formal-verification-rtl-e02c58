// Open-collector bus line shared by all ECUs.
//
// Every sender is connected through an open-collector driver that is enabled
// only while it transmits.  An enabled driver holding 0 pulls the line low;
// with all drivers disabled (or all holding 1) the line floats to 1.  The
// line is modelled as the logic AND of (not enabled or value) over all
// drivers.  Electrical effects and propagation delay are not modelled;
// the receivers tolerate a delay of up to half a clock cycle.
module flexray_bus #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] en,
  input  logic [N-1:0] val,
  output logic         bus
);
  assign bus = &(~en | val);
endmodule
