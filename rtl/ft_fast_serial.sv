// ft_fast_serial: FPGA side of the FT232H "Fast Serial" interface.
//
// The USB transceiver talks to the FPGA over a clocked serial link: the FPGA
// supplies the bit clock FSCLK, sends on FSDI and receives on FSDO, and the
// transceiver raises FSCTS when it can take a byte. Every byte, in either
// direction, travels as a frame of a 0 start bit, 8 data bits LSB first and
// one channel bit (0 = channel A). Data towards the transceiver changes on the
// falling edge of FSCLK and is sampled by it on the rising edge; data from the
// transceiver is sampled here on the rising edge. FSDO is synchronous to the
// FSCLK this block generates, so it is sampled without a synchroniser, in the
// system-clock cycle that raises FSCLK. FSCLK is the system clock
// divided by FSCLK_DIV: 50 MHz / 5 = 10 MHz, the rate of the transmitter's
// first stage, which fetches two bytes while the laser stage sends two. The
// clock only runs while the one-byte receive register is empty, so the
// transceiver can never send a byte that would be lost; this pauses a
// transmit frame too, which the synchronous link tolerates.
// LaserDrop names the FT232H and its Fast Serial mode and the 10 MHz first
// stage; the frame format is the transceiver's, and the clock-stopping flow
// control is this design's choice.
//
// Interface: tx_valid/tx_ready byte stream to the host, rx_valid/rx_ready byte
// stream from the host. Pins: fsclk, fsdi (outputs), fsdo, fscts (inputs).
// Timing: one byte per 10 FSCLK periods in each direction (1 us at 10 MHz).
module ft_fast_serial #(
  parameter int unsigned FSCLK_DIV = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  // byte stream towards the host
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  // byte stream from the host
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       rx_ready,
  // transceiver pins
  output logic       fsclk,
  output logic       fsdi,
  input  logic       fsdo,
  input  logic       fscts
);
  localparam int unsigned DW      = $clog2(FSCLK_DIV);
  localparam int unsigned LOW_LEN = FSCLK_DIV / 2;

  logic [DW-1:0] div_cnt;
  logic          run, rise_ev, fall_ev;

  // transmit side
  logic       tx_pend;
  logic [7:0] tx_pend_data;
  logic       tx_active;
  logic [8:0] tx_sh;       // data bits then channel bit, LSB first
  logic [3:0] tx_left;

  // receive side
  logic       rx_active;
  logic [3:0] rx_cnt;
  logic [7:0] rx_sh;

  assign run     = !rx_valid;
  assign rise_ev = (div_cnt == DW'(LOW_LEN - 1)) && (run || div_cnt != '0);
  assign fall_ev = (div_cnt == DW'(FSCLK_DIV - 1));
  assign tx_ready = !tx_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      fsclk   <= 1'b0;
    end else begin
      if (div_cnt != '0 || run) begin
        div_cnt <= fall_ev ? '0 : div_cnt + DW'(1);
        if (rise_ev) fsclk <= 1'b1;
        if (fall_ev) fsclk <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_pend      <= 1'b0;
      tx_pend_data <= '0;
      tx_active    <= 1'b0;
      tx_sh        <= '0;
      tx_left      <= '0;
      fsdi         <= 1'b1;
    end else begin
      if (tx_valid && tx_ready) begin
        tx_pend      <= 1'b1;
        tx_pend_data <= tx_data;
      end
      if (fall_ev) begin
        if (tx_active) begin
          if (tx_left == 4'd0) begin
            tx_active <= 1'b0;
            fsdi      <= 1'b1;
          end else begin
            fsdi    <= tx_sh[0];
            tx_sh   <= {1'b1, tx_sh[8:1]};
            tx_left <= tx_left - 4'd1;
          end
        end else if (tx_pend && fscts) begin
          tx_active <= 1'b1;
          tx_pend   <= 1'b0;
          tx_sh     <= {1'b0, tx_pend_data};   // channel bit 0 = channel A
          tx_left   <= 4'd9;
          fsdi      <= 1'b0;                   // start bit
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_active <= 1'b0;
      rx_cnt    <= '0;
      rx_sh     <= '0;
      rx_valid  <= 1'b0;
      rx_data   <= '0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (rise_ev) begin
        if (!rx_active) begin
          if (!fsdo) begin
            rx_active <= 1'b1;
            rx_cnt    <= '0;
          end
        end else if (rx_cnt == 4'd8) begin
          // channel bit: the byte is complete
          rx_active <= 1'b0;
          rx_valid  <= 1'b1;
          rx_data   <= rx_sh;
        end else begin
          rx_sh  <= {fsdo, rx_sh[7:1]};
          rx_cnt <= rx_cnt + 4'd1;
        end
      end
    end
  end
endmodule
