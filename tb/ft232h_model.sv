// ft232h_model: behavioural model of the FT232H USB transceiver in Fast
// Serial mode, as seen from the FPGA. Not synthesizable; used by testbenches.
//
// Bytes the host sends are pushed into h2f_q and go out on FSDO, one frame
// each: 0 start bit, 8 data bits LSB first, channel bit 0, driven after the
// falling edge of FSCLK. Frames arriving on FSDI (sampled on the rising edge)
// are checked for their start bit and channel bit and their bytes land in
// f2h_q. FSCTS follows cts_en, which a testbench may toggle to stall the
// FPGA. bad_frames counts frames whose channel bit was not 0.
module ft232h_model (
  input  logic fsclk,
  input  logic fsdi,
  output logic fsdo,
  output logic fscts
);
  logic [7:0] h2f_q[$];
  logic [7:0] f2h_q[$];
  bit cts_en = 1'b1;
  int bad_frames = 0;
  int n_h2f = 0, n_f2h = 0;

  // host -> FPGA
  int   tx_bit = -1;
  logic [7:0] tx_byte;
  initial fsdo = 1'b1;
  always @(negedge fsclk) begin
    if (tx_bit < 0) begin
      if (h2f_q.size() > 0) begin
        tx_byte = h2f_q.pop_front();
        fsdo    = 1'b0;
        tx_bit  = 0;
      end else begin
        fsdo = 1'b1;
      end
    end else if (tx_bit < 8) begin
      fsdo   = tx_byte[tx_bit];
      tx_bit = tx_bit + 1;
    end else if (tx_bit == 8) begin
      fsdo   = 1'b0;     // channel bit: channel A
      tx_bit = 9;
    end else begin
      fsdo   = 1'b1;
      tx_bit = -1;
      n_h2f++;
    end
  end

  // FPGA -> host
  int   rx_bit = -1;
  logic [7:0] rx_byte;
  always @(posedge fsclk) begin
    if (rx_bit < 0) begin
      if (fsdi == 1'b0) rx_bit = 0;
    end else if (rx_bit < 8) begin
      rx_byte[rx_bit] = fsdi;
      rx_bit = rx_bit + 1;
    end else begin
      if (fsdi != 1'b0) bad_frames++;
      f2h_q.push_back(rx_byte);
      n_f2h++;
      rx_bit = -1;
    end
  end

  assign fscts = cts_en;
endmodule
