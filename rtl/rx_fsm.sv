// Receiver automaton.
//
// Tracks which frame bit the receiver expects and acts on the voted bus
// signal v at every strobe (sample point):
//   idle  --0-->  FSS   (the 0 sampled in idle is TSS)
//   FSS   --1-->  BSS1
//   BSS1  --1-->  BSS0           BSS1 --0--> FES0 (the 0 was FES[1])
//   BSS0  --0-->  b[7] .. b[0]   (eight data bits, MSB first)  --> BSS1
//   FES0  --1-->  idle           frame complete (frame_done)
// Any other bit is a framing error: back to idle with frame_err.
// Between strobes the state is held.  sync, the low-level clock
// synchronisation, is raised in a cycle where a falling edge of v is seen
// (v was 1 in the previous cycle, is 0 now) while the automaton is in idle
// or BSS0, i.e. after a 1 (idle bus, or BSS[1]) has been sampled and the
// next bit is known to be 0: the frame has its 1->0 edges at known places
// at the start of TSS and at the start of every BSS[0].
// force_idle (slot start) puts the automaton back to idle at once.
// Outputs byte_o/byte_idx/byte_valid, frame_done and frame_err are
// registered pulses one cycle after the strobe that completed them.
// The transitions follow the frame format; the handling of framing errors
// is this design's choice.
module rx_fsm
  import fr_pkg::*;
#(
  parameter int unsigned LEN_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             force_idle,
  input  logic             v,
  input  logic             strobe,
  output logic             sync,
  output frame_pos_t       state,
  output logic [7:0]       byte_o,
  output logic             byte_valid,
  output logic [LEN_W-1:0] byte_idx,
  output logic             frame_done,
  output logic             frame_err
);
  logic             v_q;
  logic [2:0]       bidx;
  logic [6:0]       shreg;
  logic [LEN_W-1:0] cur_idx;

  assign sync = v_q && !v && (state == POS_IDLE || state == POS_BSS0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q        <= 1'b1;
      state      <= POS_IDLE;
      bidx       <= '0;
      shreg      <= '0;
      cur_idx    <= '0;
      byte_o     <= '0;
      byte_idx   <= '0;
      byte_valid <= 1'b0;
      frame_done <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      v_q        <= v;
      byte_valid <= 1'b0;
      frame_done <= 1'b0;
      frame_err  <= 1'b0;
      if (force_idle) begin
        state   <= POS_IDLE;
        cur_idx <= '0;
      end else if (strobe) begin
        unique case (state)
          POS_IDLE: if (!v) begin
            state   <= POS_FSS;
            cur_idx <= '0;
          end
          POS_FSS: begin
            state     <= v ? POS_BSS1 : POS_IDLE;
            frame_err <= !v;
          end
          POS_BSS1: state <= v ? POS_BSS0 : POS_FES0;
          POS_BSS0: begin
            state     <= v ? POS_IDLE : POS_DATA;
            frame_err <= v;
            bidx      <= 3'd7;
          end
          POS_DATA: begin
            shreg <= {shreg[5:0], v};
            if (bidx == 3'd0) begin
              state      <= POS_BSS1;
              byte_o     <= {shreg, v};
              byte_idx   <= cur_idx;
              byte_valid <= 1'b1;
              cur_idx    <= cur_idx + LEN_W'(1);
            end else begin
              bidx <= bidx - 3'd1;
            end
          end
          POS_FES0: begin
            state      <= POS_IDLE;
            frame_done <= v;
            frame_err  <= !v;
          end
          default: state <= POS_IDLE;
        endcase
      end
    end
  end
endmodule
