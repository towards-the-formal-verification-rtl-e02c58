// Word-addressable message buffer (used as send buffer sb and receive
// buffer rb of the bus interface).
//
// WORDS words of 32 bits; a word holds four message bytes, byte 0 in bits
// 7:0.  One synchronous write port with byte enables and one asynchronous
// read port.  The array is not reset.  Word addressing follows the
// specification; size, byte order and byte enables are this design's.
module msg_buffer #(
  parameter int unsigned WORDS = 64,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [3:0]    wbe,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (wbe[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  assign rdata = mem[raddr];
endmodule
