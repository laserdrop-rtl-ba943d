// laser_uart_tx: UART transmitter for one laser line.
//
// Sends one frame per accepted byte: a start bit (0), the 8 data bits LSB
// first and a stop bit (1). The line rests at 1 (laser at high power) between
// frames, so a long run of zeros without a stop bit can only mean a lost beam.
// Each bit lasts CLKS_PER_BIT clock cycles; with the 50 MHz FPGA clock and the
// receiver's 8x oversampling this gives 6.25 Mbaud per laser. The framing is
// the LaserDrop one; the bit period is taken from its rate calculation.
//
// Interface: valid/ready byte input. A byte is accepted in the cycle where
// valid and ready are both high; ready is high while the line is idle and in
// the last cycle of a stop bit, so back-to-back frames leave no gap.
// `done` pulses for one cycle when the stop bit of a frame has ended;
// `active` is high while a frame is on the line.
// Timing: a frame takes 10 * CLKS_PER_BIT cycles; txd is a register output.
module laser_uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd,
  output logic       done,
  output logic       active
);
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [9:0]    shreg;      // remaining frame bits, LSB goes out first
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;
  logic          busy;

  assign active = busy;

  logic last_cycle;   // final cycle of the stop bit

  assign last_cycle = busy && (bits_left == 4'd1) && (clk_cnt == CW'(CLKS_PER_BIT - 1));
  // A new byte may be taken in the last cycle of the previous stop bit, so
  // frames can follow each other with no idle cycle.
  assign ready = !busy || last_cycle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      busy      <= 1'b0;
      txd       <= 1'b1;
      done      <= 1'b0;
    end else begin
      done <= last_cycle;
      if (valid && ready) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        clk_cnt   <= '0;
        busy      <= 1'b1;
        txd       <= 1'b0;        // start bit begins now
      end else if (last_cycle) begin
        busy      <= 1'b0;
        txd       <= 1'b1;
        bits_left <= '0;
        clk_cnt   <= '0;
      end else if (busy) begin
        if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
          clk_cnt   <= '0;
          txd       <= shreg[1];
          shreg     <= {1'b1, shreg[9:1]};
          bits_left <= bits_left - 4'd1;
        end else begin
          clk_cnt <= clk_cnt + CW'(1);
        end
      end
    end
  end
endmodule
