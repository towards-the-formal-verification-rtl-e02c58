// Cluster of ECU bus interfaces on one time-triggered serial bus.
//
// N_ECU bus interfaces (bus_if), each in its own clock domain clk[i], share
// one open-collector bus line (flexray_bus).  Every interface drives the
// line through its sender flip-flop and driver enable and listens to the
// same line, so every ECU, the sender included, receives every frame.  The
// processors of the ECUs are outside this module: their I/O requests come
// in on io_req[i], read data and interrupts go out per ECU.  The clocks
// may run at slightly different rates; the receivers' low-level clock
// synchronisation and the per-round timer synchronisation absorb the drift.
// ECU numbers are configured in each interface (register u); the schedule
// names senders by these numbers.  The number of ECUs (4) is this design's
// choice.
module flexray_cluster
  import fr_pkg::*;
#(
  parameter int unsigned N_ECU    = 4,
  parameter int unsigned SB_WORDS = 64,
  parameter int unsigned NS_MAX   = 16
) (
  input  logic [N_ECU-1:0]            clk,
  input  logic [N_ECU-1:0]            rst_n,
  input  io_req_t                     io_req    [N_ECU],
  output logic    [N_ECU-1:0][IO_W-1:0] io_rdata,
  output logic    [N_ECU-1:0]         io_rvalid,
  output logic    [N_ECU-1:0]         irq,
  output logic                        bus
);
  logic [N_ECU-1:0] drv_val, drv_en;

  for (genvar i = 0; i < N_ECU; i++) begin : g_ecu
    bus_if #(.SB_WORDS(SB_WORDS), .NS_MAX(NS_MAX)) u_if (
      .clk(clk[i]), .rst_n(rst_n[i]), .io_req(io_req[i]),
      .io_rdata(io_rdata[i]), .io_rvalid(io_rvalid[i]), .irq(irq[i]),
      .bus_i(bus), .bus_o(drv_val[i]), .bus_en(drv_en[i])
    );
  end

  flexray_bus #(.N(N_ECU)) u_bus (.en(drv_en), .val(drv_val), .bus);
endmodule
