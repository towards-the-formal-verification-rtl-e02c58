// Serial sender.
//
// On start the sender transmits the frame
//     f(m) = TSS, FSS, BSS, m[0], BSS, m[1], ..., BSS, m[len-1], FES
// (TSS=0, FSS=1, BSS=1,0, FES=0,1; bytes most significant bit first) and
// holds every frame bit on the bus for REP = 8 clock cycles, 8*(4+10*len)
// cycles in all.  The bit is kept in the output flip-flop bus_o, which is
// only loaded when the value changes, and reaches the bus through an
// open-collector driver whose enable bus_en is high only during the frame.
// Bytes are read from the send buffer by byte index rd_addr; rd_byte must
// follow rd_addr combinationally.
// Timing: start in cycle t puts the first TSS copy on bus_o/bus_en from
// edge t+1; done pulses in the last cycle of the last copy of FES[0], and
// the driver is released at the following edge.  A start while busy is
// ignored.  Framing and the eight-fold repetition follow the bus protocol
// described for this interface; the byte bit order is this design's choice.
module serial_tx
  import fr_pkg::*;
#(
  parameter int unsigned LEN_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] len,
  output logic [LEN_W-1:0] rd_addr,
  input  logic [7:0]       rd_byte,
  output logic             bus_o,
  output logic             bus_en,
  output logic             busy,
  output logic             done
);
  frame_pos_t       pos, nxt_pos;
  logic [2:0]       rep;
  logic [2:0]       bidx, nxt_bidx;
  logic [LEN_W-1:0] byte_idx, nxt_byte_idx;
  logic             nxt_val;

  assign rd_addr = byte_idx;
  assign busy    = (pos != POS_IDLE);
  assign done    = (pos == POS_FES0) && (rep == 3'(REP - 1));

  // Frame position after the current bit.
  always_comb begin
    nxt_pos      = pos;
    nxt_bidx     = bidx;
    nxt_byte_idx = byte_idx;
    unique case (pos)
      POS_TSS:  nxt_pos = POS_FSS;
      POS_FSS:  nxt_pos = (len == '0) ? POS_FES1 : POS_BSS1;
      POS_BSS1: nxt_pos = POS_BSS0;
      POS_BSS0: begin nxt_pos = POS_DATA; nxt_bidx = 3'd7; end
      POS_DATA: begin
        if (bidx != 3'd0) nxt_bidx = bidx - 3'd1;
        else if (byte_idx + LEN_W'(1) < len) begin
          nxt_pos      = POS_BSS1;
          nxt_byte_idx = byte_idx + LEN_W'(1);
        end else nxt_pos = POS_FES1;
      end
      POS_FES1: nxt_pos = POS_FES0;
      POS_FES0: nxt_pos = POS_IDLE;
      default:  nxt_pos = POS_IDLE;
    endcase
  end

  // Bus value of the next frame position.
  always_comb begin
    unique case (nxt_pos)
      POS_TSS, POS_BSS0, POS_FES1: nxt_val = 1'b0;
      POS_DATA:                    nxt_val = rd_byte[nxt_bidx];
      default:                     nxt_val = 1'b1;  // FSS, BSS1, FES0, idle
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= POS_IDLE;
      rep      <= '0;
      bidx     <= '0;
      byte_idx <= '0;
      bus_o    <= 1'b1;
      bus_en   <= 1'b0;
    end else if (pos == POS_IDLE) begin
      if (start) begin
        pos      <= POS_TSS;
        rep      <= '0;
        byte_idx <= '0;
        bus_o    <= 1'b0;       // TSS
        bus_en   <= 1'b1;
      end
    end else if (rep != 3'(REP - 1)) begin
      rep <= rep + 3'd1;
    end else begin
      rep      <= '0;
      pos      <= nxt_pos;
      bidx     <= nxt_bidx;
      byte_idx <= nxt_byte_idx;
      if (nxt_val != bus_o) bus_o <= nxt_val;  // load only on a change
      if (nxt_pos == POS_IDLE) bus_en <= 1'b0;
    end
  end
endmodule
