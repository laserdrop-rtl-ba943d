// packet_buffer: the 512-bit packet register.
//
// Holds one whole packet (64 bytes by default) so that the transmitter can
// send it again, unchanged, when the receiver reports a failure, and so that
// the receiver can collect a packet before relaying it to its host. Writes
// and the transmit-side read work on byte pairs, the unit that crosses the
// two lasers; the relay side reads single bytes. The 512-bit size is
// LaserDrop's; the pair/byte port arrangement is this design's choice.
//
// Interface: wr_en writes wr_pair at pair index wr_idx (byte 2*wr_idx gets
// b0, byte 2*wr_idx+1 gets b1). rd_pair is pair rd_pair_idx, rd_byte is byte
// rd_byte_idx; tag is byte 1 of the packet. Timing: writes take effect at
// the clock edge, reads are combinational.
module packet_buffer
  import ld_pkg::*;
#(
  parameter int unsigned BYTES = ld_pkg::PKT_BYTES,
  localparam int unsigned PAIRS = BYTES / 2,
  localparam int unsigned PW = $clog2(PAIRS),
  localparam int unsigned BW = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [PW-1:0] wr_idx,
  input  byte_pair_t    wr_pair,
  input  logic [PW-1:0] rd_pair_idx,
  output byte_pair_t    rd_pair,
  input  logic [BW-1:0] rd_byte_idx,
  output logic [7:0]    rd_byte,
  output logic [7:0]    tag
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[{wr_idx, 1'b0}] <= wr_pair.b0;
      mem[{wr_idx, 1'b1}] <= wr_pair.b1;
    end
  end

  assign rd_pair.b0 = mem[{rd_pair_idx, 1'b0}];
  assign rd_pair.b1 = mem[{rd_pair_idx, 1'b1}];
  assign rd_byte    = mem[rd_byte_idx];
  assign tag        = mem[1];
endmodule
