// laser_uart_rx: oversampling UART receiver for one laser line.
//
// The comparator output of the laser receiver is brought into the clock domain
// through a two-flop synchroniser and sampled every clock. A bit lasts
// OVERSAMPLE samples; the receiver collects all of them and decides the bit by
// majority vote (more ones than zeros gives 1, a tie is broken by the middle
// sample). Reception starts on a falling edge of the line; a start bit that
// the vote calls 1 is dropped as a glitch. The stop bit is voted over its first
// OVERSAMPLE-2 samples only, so that the receiver is back in idle before the
// next frame's start edge even when frames follow back to back. A stop bit
// voted 0 means the beam was lost: the byte is discarded and frame_err pulses,
// and the receiver waits for the line to return to 1 before it re-arms.
// Oversampling by 8 with a majority vote is the LaserDrop receiver; the tie
// rule and the short stop-bit window are this design's own choices.
//
// Interface: rxd is asynchronous. valid pulses for one cycle with data; the
// pulse comes OVERSAMPLE-2 samples into the stop bit (plus 2 cycles of
// synchroniser delay). frame_err pulses in place of valid for a bad frame.
module laser_uart_rx #(
  parameter int unsigned OVERSAMPLE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(OVERSAMPLE + 1);
  localparam int unsigned STOP_SAMPLES = OVERSAMPLE - 2;
  localparam int unsigned MID = OVERSAMPLE / 2;

  typedef enum logic [1:0] {R_WAIT_HIGH, R_IDLE, R_BITS} rx_state_t;

  logic          sync1, sync2, prev;
  rx_state_t     state;
  logic [3:0]    bit_idx;     // 0 = start, 1..8 = data, 9 = stop
  logic [CW-1:0] sample_idx;  // sample within the current bit
  logic [CW-1:0] ones;        // ones counted in the current bit
  logic          mid_val;
  logic [7:0]    shreg;

  // Vote on the samples of the bit that ends in this cycle, including the
  // sample taken now.
  logic [CW-1:0] ones_now;
  logic          mid_now;
  logic [CW-1:0] n_samples;
  logic          vote;
  logic          last_sample;

  always_comb begin
    ones_now    = ones + CW'(sync2);
    mid_now     = (sample_idx == CW'(MID)) ? sync2 : mid_val;
    n_samples   = (bit_idx == 4'd9) ? CW'(STOP_SAMPLES) : CW'(OVERSAMPLE);
    last_sample = (sample_idx == n_samples - CW'(1));
    if (2 * ones_now > n_samples)      vote = 1'b1;
    else if (2 * ones_now < n_samples) vote = 1'b0;
    else                               vote = mid_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1      <= 1'b0;
      sync2      <= 1'b0;
      prev       <= 1'b0;
      state      <= R_WAIT_HIGH;
      bit_idx    <= '0;
      sample_idx <= '0;
      ones       <= '0;
      mid_val    <= 1'b0;
      shreg      <= '0;
      valid      <= 1'b0;
      data       <= '0;
      frame_err  <= 1'b0;
    end else begin
      sync1     <= rxd;
      sync2     <= sync1;
      prev      <= sync2;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_WAIT_HIGH: if (sync2) state <= R_IDLE;
        R_IDLE: begin
          if (prev && !sync2) begin
            // falling edge: this sample is the first of the start bit
            state      <= R_BITS;
            bit_idx    <= '0;
            sample_idx <= CW'(1);
            ones       <= '0;
            mid_val    <= 1'b0;
          end
        end
        R_BITS: begin
          if (sample_idx == CW'(MID)) mid_val <= sync2;
          if (last_sample) begin
            sample_idx <= '0;
            ones       <= '0;
            if (bit_idx == 4'd0) begin
              if (vote) state <= R_IDLE;          // glitch, not a start bit
              else      bit_idx <= 4'd1;
            end else if (bit_idx == 4'd9) begin
              if (vote) begin
                valid <= 1'b1;
                data  <= shreg;
                state <= R_IDLE;
              end else begin
                frame_err <= 1'b1;
                state     <= R_WAIT_HIGH;
              end
            end else begin
              shreg   <= {vote, shreg[7:1]};
              bit_idx <= bit_idx + 4'd1;
            end
          end else begin
            sample_idx <= sample_idx + CW'(1);
            ones       <= ones_now;
          end
        end
        default: state <= R_WAIT_HIGH;
      endcase
    end
  end
endmodule
