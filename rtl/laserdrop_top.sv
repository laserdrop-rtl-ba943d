// laserdrop_top: FPGA logic of one LaserDrop unit.
//
// A LaserDrop unit moves a file between two computers over two eye-safe laser
// beams, green and infrared, instead of radio. Each computer hands the file to
// its unit as 64-byte packets over USB (through an FT232H transceiver in Fast
// Serial mode). This top joins:
//   - ft_fast_serial: the FT232H port (10 MHz FSCLK), bytes to and from the host;
//   - byte_fifo: the queue of bytes going to the host (received packets,
//     forwarded tags, status bytes);
//   - packet_buffer: the 512-bit packet register;
//   - laser_link_tx: byte pairs as simultaneous UART frames on the two lasers,
//     plus the handshake square wave;
//   - two laser_mod: three-level drive (off / low = 0 / high = 1) of the two
//     NMOS switches of each laser;
//   - laser_link_rx: two 8x-oversampled UART receivers, pair assembly and
//     handshake detection on the photodiode comparator outputs;
//   - ld_ctrl: the transaction state machine (handshake, packet send with
//     ACK/FAIL and resend, tag relay, stop/done, closing handshake).
// It also drives the enable pins of the two transimpedance amplifiers: both
// the amplifier (nEN) and its ambient-light cancellation (nIDC_EN) are on
// outside reset.
//
// Lane 0 is the green laser/receiver, lane 1 the infrared one. With the
// default 50 MHz clock each laser runs at 6.25 Mbaud (8 clocks per bit), 10
// Mbit/s of payload over both; the host port moves one byte per microsecond.
// The unit structure and rates follow LaserDrop; the pin grouping is this
// design's own.
module laserdrop_top
  import ld_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT    = 8,
  parameter int unsigned HS_BITS         = 8,
  parameter int unsigned FSCLK_DIV       = 5,
  parameter int unsigned HOST_FIFO_DEPTH = 128,
  parameter int unsigned HS_TIMEOUT      = 4096,
  parameter int unsigned HS_RETRIES      = 16,
  parameter int unsigned RESP_TIMEOUT    = 16384,
  parameter int unsigned RX_GAP_CLKS     = 4096,
  parameter int unsigned RX_IDLE_TIMEOUT = 65536,
  parameter int unsigned DONE_TIMEOUT    = 65536
) (
  input  logic         clk,           // 50 MHz
  input  logic         rst_n,
  // FT232H Fast Serial port
  output logic         fsclk,
  output logic         fsdi,
  input  logic         fsdo,
  input  logic         fscts,
  // laser switches: [0] green, [1] infrared
  output logic [1:0]   las_gate_lo,
  output logic [1:0]   las_gate_hi,
  // receiver comparator outputs: [0] green, [1] infrared
  input  logic [1:0]   pd_in,
  // transimpedance amplifier controls (active low)
  output logic [1:0]   tia_nen,
  output logic [1:0]   tia_nidc_en,
  // status
  output ld_state_t    state,
  output logic         is_tx,
  output ld_events_t   ev,
  output laser_state_t las_state [2]
);
  localparam int unsigned PW = $clog2(PKT_PAIRS);
  localparam int unsigned BW = $clog2(PKT_BYTES);

  // host port
  logic       urx_valid, urx_ready;
  logic [7:0] urx_data;
  logic       q_in_valid, q_in_ready, q_out_valid, q_out_ready;
  logic [7:0] q_in_data, q_out_data;

  // laser link
  logic       ltx_valid, ltx_ready, sq_start, ltx_busy, laser_en;
  byte_pair_t ltx_pair;
  logic [1:0] txd;
  logic       lrx_valid, lrx_err, lrx_sq, sq_en;
  byte_pair_t lrx_pair;

  // packet register
  logic          buf_wr_en;
  logic [PW-1:0] buf_wr_idx, buf_rd_pair_idx;
  byte_pair_t    buf_wr_pair, buf_rd_pair;
  logic [BW-1:0] buf_rd_byte_idx;
  logic [7:0]    buf_rd_byte, buf_tag;

  ft_fast_serial #(.FSCLK_DIV(FSCLK_DIV)) u_fs (
    .clk, .rst_n,
    .tx_valid(q_out_valid), .tx_data(q_out_data), .tx_ready(q_out_ready),
    .rx_valid(urx_valid),   .rx_data(urx_data),   .rx_ready(urx_ready),
    .fsclk, .fsdi, .fsdo, .fscts
  );

  byte_fifo #(.DEPTH(HOST_FIFO_DEPTH), .WIDTH(8)) u_host_q (
    .clk, .rst_n,
    .in_valid(q_in_valid),   .in_data(q_in_data),   .in_ready(q_in_ready),
    .out_valid(q_out_valid), .out_data(q_out_data), .out_ready(q_out_ready),
    .count()
  );

  packet_buffer #(.BYTES(PKT_BYTES)) u_pkt (
    .clk,
    .wr_en(buf_wr_en), .wr_idx(buf_wr_idx), .wr_pair(buf_wr_pair),
    .rd_pair_idx(buf_rd_pair_idx), .rd_pair(buf_rd_pair),
    .rd_byte_idx(buf_rd_byte_idx), .rd_byte(buf_rd_byte),
    .tag(buf_tag)
  );

  laser_link_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .HS_BITS(HS_BITS)) u_ltx (
    .clk, .rst_n,
    .pair_valid(ltx_valid), .pair(ltx_pair), .pair_ready(ltx_ready),
    .sq_start, .busy(ltx_busy), .txd
  );

  for (genvar l = 0; l < 2; l++) begin : g_laser
    laser_mod u_mod (
      .clk, .rst_n, .en(laser_en), .bit_i(txd[l]),
      .gate_lo(las_gate_lo[l]), .gate_hi(las_gate_hi[l]), .state(las_state[l])
    );
  end

  laser_link_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .SQ_MIN_RUNS(HS_BITS - 2)) u_lrx (
    .clk, .rst_n, .rxd(pd_in), .sq_en,
    .pair_valid(lrx_valid), .pair(lrx_pair), .err(lrx_err), .sq_detect(lrx_sq)
  );

  ld_ctrl #(
    .PKT_LEN(PKT_BYTES), .HS_TIMEOUT(HS_TIMEOUT), .HS_RETRIES(HS_RETRIES),
    .RESP_TIMEOUT(RESP_TIMEOUT), .RX_GAP_CLKS(RX_GAP_CLKS),
    .RX_IDLE_TIMEOUT(RX_IDLE_TIMEOUT), .DONE_TIMEOUT(DONE_TIMEOUT)
  ) u_ctrl (
    .clk, .rst_n,
    .urx_valid, .urx_data, .urx_ready,
    .utx_valid(q_in_valid), .utx_data(q_in_data), .utx_ready(q_in_ready),
    .ltx_valid, .ltx_pair, .ltx_ready, .sq_start, .ltx_busy, .laser_en,
    .lrx_valid, .lrx_pair, .lrx_err, .lrx_sq, .sq_en,
    .buf_wr_en, .buf_wr_idx, .buf_wr_pair, .buf_rd_pair_idx, .buf_rd_pair,
    .buf_rd_byte_idx, .buf_rd_byte, .buf_tag,
    .state, .is_tx, .ev
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tia_nen     <= 2'b11;
      tia_nidc_en <= 2'b11;
    end else begin
      tia_nen     <= 2'b00;
      tia_nidc_en <= 2'b00;
    end
  end
endmodule
