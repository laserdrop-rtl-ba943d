// laser_link_rx: receive side of the dual-laser link.
//
// Two oversampling UART receivers, one for the green and one for the infrared
// photodiode channel, each deliver bytes on their own. The transmitter starts
// both frames of a pair together, so the two bytes of a pair arrive within a
// few cycles of each other. Each lane's byte is held until the other lane's
// byte has arrived, and then the pair is emitted. A framing error on either
// lane, or a held byte whose partner has not come within SKEW_MAX cycles,
// drops what is held and pulses `err` once (the beam was blocked or lost); a
// byte the other lane still delivers for that lost pair within SKEW_MAX
// cycles is dropped too. The
// block also holds one square-wave detector per lane; `sq_detect` pulses when
// both lanes have shown the handshake wave within SKEW_MAX cycles of each
// other, so a handshake also proves that both beams are aligned. The two-lane
// receive path follows LaserDrop; the pairing, skew limit and two-lane
// handshake condition are this design's choices.
//
// Interface: rxd[0] green, rxd[1] infrared (asynchronous comparator outputs).
// pair_valid pulses for one cycle with pair; err pulses for one cycle.
// sq_en enables the square-wave detectors.
module laser_link_rx
  import ld_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 8,
  parameter int unsigned SKEW_MAX     = 4 * CLKS_PER_BIT,
  parameter int unsigned SQ_MIN_RUNS  = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] rxd,
  input  logic       sq_en,
  output logic       pair_valid,
  output byte_pair_t pair,
  output logic       err,
  output logic       sq_detect
);
  localparam int unsigned SW = $clog2(SKEW_MAX + 2);

  logic [1:0]       lane_valid, lane_ferr, lane_sq;
  logic [7:0]       lane_data [2];
  logic [1:0]       held;
  logic [7:0]       held_data [2];
  logic [SW-1:0]    skew_cnt;
  logic [1:0]       drop;       // discard this lane's next byte: its partner was bad
  logic [SW-1:0]    drop_cnt;
  logic [1:0]       sq_seen;
  logic [SW-1:0]    sq_cnt;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    laser_uart_rx #(.OVERSAMPLE(CLKS_PER_BIT)) u_rx (
      .clk, .rst_n, .rxd(rxd[l]),
      .valid(lane_valid[l]), .data(lane_data[l]), .frame_err(lane_ferr[l])
    );
    square_wave_det #(.CLKS_PER_BIT(CLKS_PER_BIT), .MIN_RUNS(SQ_MIN_RUNS)) u_sq (
      .clk, .rst_n, .en(sq_en), .rxd(rxd[l]), .detect(lane_sq[l])
    );
  end

  logic [1:0] held_next;
  logic       pair_now, skew_out;

  logic [1:0] lane_ok;

  always_comb begin
    lane_ok   = lane_valid & ~drop;
    held_next = held | lane_ok;
    pair_now  = &held_next;
    skew_out  = (|held) && (skew_cnt == SW'(SKEW_MAX));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held         <= '0;
      drop         <= '0;
      drop_cnt     <= '0;
      held_data[0] <= '0;
      held_data[1] <= '0;
      skew_cnt     <= '0;
      pair_valid   <= 1'b0;
      pair         <= '0;
      err          <= 1'b0;
    end else begin
      pair_valid <= 1'b0;
      err        <= 1'b0;
      for (int l = 0; l < 2; l++)
        if (lane_valid[l]) held_data[l] <= lane_data[l];
      // A lane whose byte was discarded may still deliver its partner; that
      // byte belongs to the lost pair and is dropped within SKEW_MAX cycles.
      if (|drop) begin
        drop     <= drop & ~lane_valid;
        drop_cnt <= drop_cnt + SW'(1);
        if (drop_cnt == SW'(SKEW_MAX)) drop <= '0;
      end
      if (|lane_ferr || skew_out) begin
        held     <= '0;
        skew_cnt <= '0;
        err      <= 1'b1;
        drop     <= ~(held | lane_valid | lane_ferr);
        drop_cnt <= '0;
      end else if (pair_now) begin
        held       <= '0;
        skew_cnt   <= '0;
        pair_valid <= 1'b1;
        pair.b0    <= lane_ok[0] ? lane_data[0] : held_data[0];
        pair.b1    <= lane_ok[1] ? lane_data[1] : held_data[1];
      end else begin
        held <= held_next;
        if (|held_next) skew_cnt <= skew_cnt + SW'(1);
      end
    end
  end

  // Handshake: both lanes must detect the wave close together.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_seen   <= '0;
      sq_cnt    <= '0;
      sq_detect <= 1'b0;
    end else begin
      sq_detect <= 1'b0;
      if (!sq_en) begin
        sq_seen <= '0;
        sq_cnt  <= '0;
      end else if (&(sq_seen | lane_sq)) begin
        sq_seen   <= '0;
        sq_cnt    <= '0;
        sq_detect <= 1'b1;
      end else if (|(sq_seen | lane_sq)) begin
        sq_seen <= sq_seen | lane_sq;
        if (sq_cnt == SW'(SKEW_MAX)) begin
          sq_seen <= '0;
          sq_cnt  <= '0;
        end else begin
          sq_cnt <= sq_cnt + SW'(1);
        end
      end
    end
  end
endmodule
