// laser_link_tx: transmit side of the dual-laser link.
//
// LaserDrop splits its data over two lasers of different colour, green and
// infrared, and sends on both at once. This block takes one byte pair at a
// time and starts a UART frame with byte b0 on the green laser and byte b1 on
// the infrared laser in the same cycle, so both frames end together and the
// pair is released together. It also generates the handshake square wave:
// on sq_start both lines alternate 0,1,0,1,... for HS_BITS bit periods and
// then rest at 1. This is the second stage of the transmitter pipeline; the
// first stage (fetching bytes from the USB transceiver) feeds it through the
// valid/ready handshake.
//
// Interface: pair_valid/pair_ready accept a pair when the link is idle.
// sq_start is honoured only when the link is idle (busy low). txd[0] is the
// green line, txd[1] the infrared line; both are 1 when idle.
// Timing: a pair takes 10 * CLKS_PER_BIT cycles, a square wave
// HS_BITS * CLKS_PER_BIT cycles.
module laser_link_tx
  import ld_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 8,
  parameter int unsigned HS_BITS      = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pair_valid,
  input  byte_pair_t pair,
  output logic       pair_ready,
  input  logic       sq_start,
  output logic       busy,
  output logic [1:0] txd
);
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam int unsigned HW = $clog2(HS_BITS + 1);

  logic [1:0]    lane_ready, lane_txd, lane_done, lane_active;
  logic          sq_active;
  logic [HW-1:0] sq_bits_left;
  logic [CW-1:0] sq_cnt;
  logic          sq_level;
  logic          take;

  // Both lanes run in lock step, so the green lane's state stands for both.
  assign busy       = lane_active[0] || sq_active;
  assign pair_ready = !sq_active && !sq_start && (&lane_ready);
  assign take       = pair_valid && pair_ready;   // a square-wave request wins over a pair

  laser_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_green (
    .clk, .rst_n, .valid(take), .data(pair.b0),
    .ready(lane_ready[0]), .txd(lane_txd[0]), .done(lane_done[0]), .active(lane_active[0])
  );
  laser_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ir (
    .clk, .rst_n, .valid(take), .data(pair.b1),
    .ready(lane_ready[1]), .txd(lane_txd[1]), .done(lane_done[1]), .active(lane_active[1])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_active    <= 1'b0;
      sq_bits_left <= '0;
      sq_cnt       <= '0;
      sq_level     <= 1'b1;
    end else begin
      if (!busy && sq_start && !take && !sq_active) begin
        sq_active    <= 1'b1;
        sq_bits_left <= HW'(HS_BITS);
        sq_cnt       <= '0;
        sq_level     <= 1'b0;
      end else if (sq_active) begin
        if (sq_cnt == CW'(CLKS_PER_BIT - 1)) begin
          sq_cnt <= '0;
          if (sq_bits_left == HW'(1)) begin
            sq_active <= 1'b0;
            sq_level  <= 1'b1;
          end else begin
            sq_level <= !sq_level;
          end
          sq_bits_left <= sq_bits_left - HW'(1);
        end else begin
          sq_cnt <= sq_cnt + CW'(1);
        end
      end
    end
  end

  assign txd = sq_active ? {2{sq_level}} : lane_txd;

  // Both lanes are started together and must finish together.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    lane_done[0] == lane_done[1]);
endmodule
