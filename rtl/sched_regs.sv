// Configuration registers of the bus interface.
//
// Holds the number u of the ECU the interface belongs to and the global bus
// schedule S = (ns, ecu, st, mlen), extended by the per-slot wakeup times:
// ns slots per bus round; in slot s ECU ecu(s) starts sending mlen(s) bytes
// at timer value st(s), and every ECU raises its wakeup interrupt at timer
// value wakeup(s).  The registers are written through the processor I/O
// port during startup and are read by the slot sequencer for slot sigma.
// Address map (word addresses): 0x02 u, 0x03 ns, 0x40+s ecu(s),
// 0x60+s st(s), 0x80+s mlen(s), 0xA0+s wakeup(s); other addresses are
// ignored.  Writes take effect at the next edge; reads are combinational.
// All registers reset to 0.  The address map is this design's choice.
module sched_regs
  import fr_pkg::*;
#(
  parameter int unsigned NS_MAX = 16,
  localparam int unsigned SW    = $clog2(NS_MAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [7:0]      addr,
  input  logic [IO_W-1:0] wdata,
  input  logic [SW-1:0]   sigma,
  output logic [7:0]      cfg_u,
  output logic [SW:0]     cfg_ns,
  output slot_cfg_t       slot
);
  slot_cfg_t tab [NS_MAX];
  logic      in_tab;
  logic [SW-1:0] idx;

  initial assert (NS_MAX <= 32) else $error("NS_MAX must be at most 32");

  assign idx    = addr[SW-1:0];
  assign in_tab = (32'(addr[4:0]) < NS_MAX);
  assign slot   = tab[sigma];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_u  <= '0;
      cfg_ns <= '0;
      for (int s = 0; s < NS_MAX; s++) tab[s] <= '0;
    end else if (we) begin
      if (addr == A_U)  cfg_u  <= wdata[7:0];
      if (addr == A_NS) cfg_ns <= wdata[SW:0];
      if (in_tab) begin
        unique case (addr[7:5])
          A_ECU:    tab[idx].ecu    <= wdata[7:0];
          A_ST:     tab[idx].st     <= wdata[TI_W-1:0];
          A_MLEN:   tab[idx].mlen   <= wdata[15:0];
          A_WAKEUP: tab[idx].wakeup <= wdata[TI_W-1:0];
          default: ;
        endcase
      end
    end
  end
endmodule
