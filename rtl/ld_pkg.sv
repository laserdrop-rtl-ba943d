// ld_pkg: constants and types shared by the LaserDrop FPGA logic.
//
// The link carries every laser transfer as a byte pair: byte b0 on the green
// laser and byte b1 on the infrared laser, sent at the same time as two UART
// frames (start bit, 8 data bits LSB first, stop bit). A data packet is 64
// bytes (start byte, tag byte, 60 data bytes, 2 Hamming bytes), that is 32
// pairs. The packet layout, the 512-bit packet size, the two-laser split and
// the UART framing follow the LaserDrop protocol; the numeric codes of the
// control symbols below are this design's own choice, as is the use of a
// pair {code, argument} for every control message.
package ld_pkg;

  // Packet geometry.
  localparam int unsigned PKT_BYTES  = 64;              // 512-bit packet register
  localparam int unsigned DATA_BYTES = 60;
  localparam int unsigned PKT_PAIRS  = PKT_BYTES / 2;

  // Symbol codes, used on the lasers (first byte of a pair) and towards the host.
  localparam logic [7:0] SYM_PKT_START = 8'h7E;  // first byte of every data packet
  localparam logic [7:0] SYM_STOP      = 8'h7D;  // stop message: STOP, final length, final tag
  localparam logic [7:0] SYM_ACK       = 8'h06;  // packet accepted: {ACK, tag}
  localparam logic [7:0] SYM_FAIL      = 8'h15;  // packet not received: {FAIL, 0}
  localparam logic [7:0] SYM_RESEND    = 8'h12;  // host asks for a packet again: {RESEND, tag}
  localparam logic [7:0] SYM_DONE      = 8'h04;  // receiver has every packet: {DONE, 0}
  localparam logic [7:0] SYM_TXN_START = 8'h02;  // host <-> FPGA: start of transaction
  localparam logic [7:0] SYM_TXN_DONE  = 8'h03;  // FPGA -> host: transaction complete

  typedef struct packed {
    logic [7:0] b0;   // green laser
    logic [7:0] b1;   // infrared laser
  } byte_pair_t;

  // Optical state of one laser (off, low power = logic 0, high power = logic 1).
  typedef enum logic [1:0] {
    LAS_OFF  = 2'd0,
    LAS_LOW  = 2'd1,
    LAS_HIGH = 2'd2
  } laser_state_t;

  // States of the unit controller.
  typedef enum logic [4:0] {
    S_INIT,
    S_HS_SEND,        // transmitter: send handshake square wave
    S_HS_WAIT,        // transmitter: wait for the reciprocated square wave
    S_HS_REPLY,       // receiver: reciprocate the square wave
    S_TX_HDR,         // transmitter: wait for the next message from the host
    S_TX_STOP_ARGS,   // transmitter: read length and tag of the stop message
    S_TX_SEND,        // transmitter: fetch and send the packet (two-stage pipeline)
    S_TX_WAIT_RESP,   // transmitter: wait for ACK / FAIL
    S_TX_STOP_SEND,   // transmitter: send the stop message
    S_TERM_SEND,      // transmitter: termination square wave
    S_TERM_WAIT,      // transmitter: wait for the reciprocated termination wave
    S_RX_IDLE,        // receiver: between packets
    S_RX_PKT,         // receiver: collecting a packet
    S_RX_STOP,        // receiver: second pair of the stop message
    S_RX_RELAY,       // receiver: copy the packet to the host queue
    S_RX_RESP,        // receiver: send ACK or FAIL
    S_RX_TERM_WAIT,   // receiver: DONE sent, wait for termination wave
    S_RX_TERM_REPLY   // receiver: reciprocate termination wave
  } ld_state_t;

  // One-cycle event pulses from the controller, for status and statistics.
  typedef struct packed {
    logic hs_done;       // opening handshake completed (either role)
    logic hs_retry;      // transmitter repeated its square wave
    logic pkt_sent;      // transmitter finished sending a packet
    logic pkt_resend;    // transmitter started sending the same packet again
    logic ack_rx;        // transmitter got a matching ACK
    logic fail_rx;       // transmitter got FAIL
    logic resp_timeout;  // transmitter saw no answer, or an unexpected one
    logic tag_fwd;       // transmitter forwarded a RESEND tag to its host
    logic rx_pkt_ok;     // receiver relayed a complete packet and sent ACK
    logic rx_pkt_fail;   // receiver lost a packet and sent FAIL
    logic tag_req;       // receiver sent a RESEND tag from its host
    logic stop_msg;      // stop message sent (transmitter) or relayed (receiver)
    logic done_msg;      // DONE sent (receiver) or received (transmitter)
    logic term_done;     // closing handshake completed, back to INIT
  } ld_events_t;

endpackage
