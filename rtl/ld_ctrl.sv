// ld_ctrl: transaction controller of one LaserDrop unit.
//
// The same FPGA logic serves as transmitter or receiver; the role is decided
// in INIT. A start-of-transaction byte from the host makes the unit the
// transmitter: it sends the handshake square wave on both lasers and waits for
// the peer to send one back, retrying up to HS_RETRIES times. A square wave
// seen on the receivers makes the unit the receiver: it answers with its own
// square wave and tells its host that a transaction has started.
//
// Transmitter. Each host message starts with a symbol byte. A packet (start
// byte, tag, 60 data bytes, 2 Hamming bytes) is written pair by pair into the
// 512-bit packet register while, in the same state, pairs already written are
// sent over the lasers: a two-stage pipeline in which the USB fetch and the
// laser send overlap. After the packet the unit waits for the answer. A
// matching {ACK, tag} ends the packet and is passed on to the host; FAIL, a
// wrong answer, a line error or RESP_TIMEOUT cycles of silence make it send
// the same packet again from the register. A FAIL that arrives while the
// packet is still being sent restarts it at once. {RESEND, tag} from the receiver
// (its host found an uncorrectable error) is passed to the host at any time.
// A stop message (STOP, final length, final tag) is sent as two pairs; the
// unit then keeps serving host messages (packets asked for again) until the
// receiver answers DONE, repeating the stop message after DONE_TIMEOUT. DONE
// starts the closing square-wave handshake; when it completes the host gets a
// transaction-complete byte and the unit returns to INIT.
//
// Receiver. Pairs starting with the packet start byte are collected into the
// packet register. A full packet is copied to the host queue and answered with
// {ACK, tag}; a line error or a gap of more than RX_GAP_CLKS cycles inside a
// packet is answered with FAIL. A stop message is relayed to the host. Bytes
// from the host run in parallel: {RESEND, tag} goes out on the lasers at
// once, and DONE (the host's error queue is empty) is sent as {DONE, 0},
// after which the unit waits for the closing square wave, answers it and
// returns to INIT. Without any pair within RX_IDLE_TIMEOUT of the handshake
// it gives up and returns to INIT.
//
// The states and their order, the packet format, ACK/FAIL with resending from
// the packet register, tag relaying, stop/done and the two handshakes follow
// the LaserDrop protocol. The symbol codes, the pair {code, argument} form of
// control messages, all time-outs and retry limits, the tag check on ACK and
// the host-side byte messages are this design's own choices.
//
// Interface: byte streams to and from the host (valid/ready), pair stream to
// the laser transmitter with square-wave request, pair stream and error and
// square-wave pulses from the laser receiver, packet register ports, laser
// enable, state and event outputs.
module ld_ctrl
  import ld_pkg::*;
#(
  parameter int unsigned PKT_LEN       = ld_pkg::PKT_BYTES,
  parameter int unsigned HS_TIMEOUT      = 4096,
  parameter int unsigned HS_RETRIES      = 16,
  parameter int unsigned RESP_TIMEOUT    = 16384,
  parameter int unsigned RX_GAP_CLKS     = 4096,
  parameter int unsigned RX_IDLE_TIMEOUT = 65536,
  parameter int unsigned DONE_TIMEOUT    = 65536,
  localparam int unsigned PAIRS = PKT_LEN / 2,
  localparam int unsigned PW = $clog2(PAIRS),
  localparam int unsigned BW = $clog2(PKT_LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  // bytes from the host (USB transceiver)
  input  logic          urx_valid,
  input  logic [7:0]    urx_data,
  output logic          urx_ready,
  // bytes to the host
  output logic          utx_valid,
  output logic [7:0]    utx_data,
  input  logic          utx_ready,
  // laser transmitter
  output logic          ltx_valid,
  output byte_pair_t    ltx_pair,
  input  logic          ltx_ready,
  output logic          sq_start,
  input  logic          ltx_busy,
  output logic          laser_en,
  // laser receiver
  input  logic          lrx_valid,
  input  byte_pair_t    lrx_pair,
  input  logic          lrx_err,
  input  logic          lrx_sq,
  output logic          sq_en,
  // packet register
  output logic          buf_wr_en,
  output logic [PW-1:0] buf_wr_idx,
  output byte_pair_t    buf_wr_pair,
  output logic [PW-1:0] buf_rd_pair_idx,
  input  byte_pair_t    buf_rd_pair,
  output logic [BW-1:0] buf_rd_byte_idx,
  input  logic [7:0]    buf_rd_byte,
  input  logic [7:0]    buf_tag,
  // status
  output ld_state_t     state,
  output logic          is_tx,
  output ld_events_t    ev
);
  localparam int unsigned TW = $clog2(RX_IDLE_TIMEOUT + DONE_TIMEOUT + RESP_TIMEOUT + 2);
  localparam int unsigned RW = $clog2(HS_RETRIES + 1);

  typedef enum logic [1:0] {HC_IDLE, HC_TAG, HC_SEND} hc_state_t;

  logic [TW-1:0]  timer;
  logic [RW-1:0]  retries;
  logic           sq_issued;
  logic [BW:0]    fcnt;       // bytes fetched into the packet register
  logic [PW:0]    scnt;       // pairs sent / received / relayed
  logic [BW:0]    relay_idx;
  logic [7:0]     lo_byte;    // first byte of a pair being fetched
  logic           stop_sent;
  logic           got_pair;   // receiver has seen traffic since the handshake
  logic [7:0]     stop_len, stop_tag;
  logic [1:0]     stop_idx;

  // message queue towards the host (up to 3 bytes)
  logic [7:0]     msg [3];
  logic [1:0]     msg_len, msg_idx;
  logic           msg_busy;

  // receiver: pending answer and host command pair
  logic           resp_pend;
  byte_pair_t     resp_pair;
  hc_state_t      hc_state;
  byte_pair_t     cmd_pair;
  logic           cmd_is_done;

  logic           wave_done;  // square wave issued earlier has ended
  logic           urx_take, ltx_take;
  logic           rx_role_cmds, cmd_send_ok;

  assign msg_busy  = (msg_idx != msg_len);
  assign wave_done = sq_issued && !ltx_busy && !sq_start;
  assign urx_take  = urx_valid && urx_ready;
  assign ltx_take  = ltx_valid && ltx_ready;

  // Host commands are accepted by the receiver while it is between packets or
  // collecting one; DONE only goes out between packets.
  assign rx_role_cmds = !is_tx && (state inside {S_RX_IDLE, S_RX_PKT, S_RX_STOP,
                                                 S_RX_RELAY, S_RX_RESP});
  assign cmd_send_ok  = (hc_state == HC_SEND) &&
                        (cmd_is_done ? (state == S_RX_IDLE)
                                     : (state inside {S_RX_IDLE, S_RX_PKT, S_RX_STOP}));

  // ------------------------------------------------------------------
  // Combinational outputs
  // ------------------------------------------------------------------
  always_comb begin
    urx_ready = 1'b0;
    unique case (state)
      S_INIT, S_TX_HDR, S_TX_STOP_ARGS: urx_ready = 1'b1;
      S_TX_SEND:                        urx_ready = (fcnt < (BW+1)'(PKT_LEN));
      default:                          urx_ready = rx_role_cmds && (hc_state != HC_SEND);
    endcase
  end

  always_comb begin
    ltx_valid = 1'b0;
    ltx_pair  = '0;
    unique case (state)
      S_TX_SEND: begin
        ltx_valid = (scnt < (PW+1)'(PAIRS)) &&
                    ((BW+1)'({scnt, 1'b0}) + (BW+1)'(2) <= fcnt);
        ltx_pair  = buf_rd_pair;
      end
      S_TX_STOP_SEND: begin
        ltx_valid = 1'b1;
        ltx_pair  = (stop_idx == 2'd0) ? '{b0: SYM_STOP, b1: stop_len}
                                       : '{b0: stop_tag, b1: 8'h00};
      end
      default: begin
        if (!is_tx && resp_pend) begin
          ltx_valid = (state == S_RX_RESP);
          ltx_pair  = resp_pair;
        end else if (!is_tx && (cmd_send_ok || (hc_state == HC_SEND &&
                                                state == S_RX_TERM_WAIT))) begin
          ltx_valid = 1'b1;
          ltx_pair  = cmd_pair;
        end
      end
    endcase
  end

  assign sq_start = (state inside {S_HS_SEND, S_HS_REPLY, S_TERM_SEND, S_RX_TERM_REPLY})
                    && !sq_issued && !ltx_busy;
  assign sq_en    = (state inside {S_INIT, S_HS_WAIT, S_TERM_WAIT, S_RX_TERM_WAIT});
  assign laser_en = (state != S_INIT);

  assign buf_rd_pair_idx = scnt[PW-1:0];
  assign buf_rd_byte_idx = relay_idx[BW-1:0];

  always_comb begin
    buf_wr_en   = 1'b0;
    buf_wr_idx  = '0;
    buf_wr_pair = '0;
    if ((state == S_TX_SEND) && urx_take && fcnt[0]) begin
      buf_wr_en   = 1'b1;
      buf_wr_idx  = fcnt[BW-1:1];
      buf_wr_pair = '{b0: lo_byte, b1: urx_data};
    end else if ((state inside {S_RX_IDLE, S_RX_PKT}) && lrx_valid &&
                 (state == S_RX_PKT || lrx_pair.b0 == SYM_PKT_START)) begin
      buf_wr_en   = 1'b1;
      buf_wr_idx  = (state == S_RX_PKT) ? scnt[PW-1:0] : '0;
      buf_wr_pair = lrx_pair;
    end
  end

  always_comb begin
    if (state == S_RX_RELAY) begin
      utx_valid = (relay_idx < (BW+1)'(PKT_LEN)) && !msg_busy;
      utx_data  = buf_rd_byte;
    end else begin
      utx_valid = msg_busy;
      utx_data  = msg[msg_idx];
    end
  end

  // ------------------------------------------------------------------
  // Main state machine
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      is_tx       <= 1'b0;
      timer       <= '0;
      retries     <= '0;
      sq_issued   <= 1'b0;
      fcnt        <= '0;
      scnt        <= '0;
      relay_idx   <= '0;
      lo_byte     <= '0;
      stop_sent   <= 1'b0;
      got_pair    <= 1'b0;
      stop_len    <= '0;
      stop_tag    <= '0;
      stop_idx    <= '0;
      msg[0]      <= '0;
      msg[1]      <= '0;
      msg[2]      <= '0;
      msg_len     <= '0;
      msg_idx     <= '0;
      resp_pend   <= 1'b0;
      resp_pair   <= '0;
      hc_state    <= HC_IDLE;
      cmd_pair    <= '0;
      cmd_is_done <= 1'b0;
      ev          <= '0;
    end else begin
      ev <= '0;
      if (sq_start) sq_issued <= 1'b1;

      // drain the host message register
      if (state != S_RX_RELAY && msg_busy && utx_ready) msg_idx <= msg_idx + 2'd1;

      // receiver: commands from the host
      if (rx_role_cmds && urx_take) begin
        unique case (hc_state)
          HC_IDLE: begin
            if (urx_data == SYM_RESEND) hc_state <= HC_TAG;
            else if (urx_data == SYM_DONE) begin
              hc_state    <= HC_SEND;
              cmd_pair    <= '{b0: SYM_DONE, b1: 8'h00};
              cmd_is_done <= 1'b1;
            end
          end
          HC_TAG: begin
            hc_state    <= HC_SEND;
            cmd_pair    <= '{b0: SYM_RESEND, b1: urx_data};
            cmd_is_done <= 1'b0;
          end
          default: ;
        endcase
      end
      if (!is_tx && !(resp_pend && state == S_RX_RESP) && ltx_take && hc_state == HC_SEND) begin
        hc_state <= HC_IDLE;
        if (cmd_is_done) begin
          ev.done_msg <= 1'b1;
          if (state == S_RX_IDLE) begin
            state <= S_RX_TERM_WAIT;
            timer <= '0;
          end
        end else begin
          ev.tag_req <= 1'b1;
        end
      end

      // transmitter: RESEND tags from the receiver go to the host at any time
      if (is_tx && state != S_INIT && lrx_valid && lrx_pair.b0 == SYM_RESEND) begin
        msg[0]      <= SYM_RESEND;
        msg[1]      <= lrx_pair.b1;
        msg_len     <= 2'd2;
        msg_idx     <= '0;
        ev.tag_fwd  <= 1'b1;
      end

      unique case (state)
        S_INIT: begin
          timer     <= '0;
          retries   <= '0;
          sq_issued <= 1'b0;
          stop_sent <= 1'b0;
          resp_pend <= 1'b0;
          hc_state  <= HC_IDLE;
          if (urx_take && urx_data == SYM_TXN_START) begin
            is_tx <= 1'b1;
            state <= S_HS_SEND;
          end else if (lrx_sq) begin
            is_tx <= 1'b0;
            state <= S_HS_REPLY;
          end
        end

        // ---------------- opening handshake ----------------
        S_HS_SEND: begin
          if (sq_start) begin
            state <= S_HS_WAIT;
            timer <= '0;
          end
        end
        S_HS_WAIT: begin
          timer <= timer + TW'(1);
          if (wave_done) sq_issued <= 1'b0;
          if (lrx_sq) begin
            ev.hs_done <= 1'b1;
            state      <= S_TX_HDR;
            sq_issued  <= 1'b0;
            timer      <= '0;
          end else if (timer >= TW'(HS_TIMEOUT)) begin
            sq_issued <= 1'b0;
            if (retries == RW'(HS_RETRIES - 1)) begin
              state <= S_INIT;
            end else begin
              retries     <= retries + RW'(1);
              ev.hs_retry <= 1'b1;
              state       <= S_HS_SEND;
            end
          end
        end
        S_HS_REPLY: begin
          if (wave_done && !msg_busy) begin
            sq_issued  <= 1'b0;
            msg[0]     <= SYM_TXN_START;
            msg_len    <= 2'd1;
            msg_idx    <= '0;
            ev.hs_done <= 1'b1;
            got_pair   <= 1'b0;
            timer      <= '0;
            state      <= S_RX_IDLE;
          end
        end

        // ---------------- transmitter ----------------
        S_TX_HDR: begin
          if (stop_sent) timer <= timer + TW'(1);
          if (urx_take) begin
            if (urx_data == SYM_PKT_START) begin
              lo_byte <= urx_data;
              fcnt    <= (BW+1)'(1);
              scnt    <= '0;
              state   <= S_TX_SEND;
            end else if (urx_data == SYM_STOP) begin
              stop_idx <= '0;
              state    <= S_TX_STOP_ARGS;
            end
          end else if (stop_sent && lrx_valid && lrx_pair.b0 == SYM_DONE) begin
            ev.done_msg <= 1'b1;
            retries     <= '0;
            state       <= S_TERM_SEND;
          end else if (stop_sent && timer >= TW'(DONE_TIMEOUT)) begin
            stop_idx <= '0;
            state    <= S_TX_STOP_SEND;
          end
        end
        S_TX_STOP_ARGS: begin
          if (urx_take) begin
            if (stop_idx == 2'd0) begin
              stop_len <= urx_data;
              stop_idx <= 2'd1;
            end else begin
              stop_tag <= urx_data;
              stop_idx <= 2'd0;
              state    <= S_TX_STOP_SEND;
            end
          end
        end
        S_TX_SEND: begin
          if (urx_take) begin
            fcnt <= fcnt + (BW+1)'(1);
            if (!fcnt[0]) lo_byte <= urx_data;
          end
          if (lrx_valid && lrx_pair.b0 == SYM_FAIL) begin
            // the receiver lost this packet already: start it again at once
            ev.fail_rx    <= 1'b1;
            ev.pkt_resend <= 1'b1;
            scnt          <= '0;
          end else if (ltx_take) begin
            scnt <= scnt + (PW+1)'(1);
            if (scnt == (PW+1)'(PAIRS - 1)) begin
              ev.pkt_sent <= 1'b1;
              state       <= S_TX_WAIT_RESP;
              timer       <= '0;
            end
          end
        end
        S_TX_WAIT_RESP: begin
          timer <= timer + TW'(1);
          if (lrx_valid && lrx_pair.b0 == SYM_RESEND) begin
            // handled above; keep waiting for the answer
          end else if (lrx_valid && lrx_pair.b0 == SYM_ACK && lrx_pair.b1 == buf_tag) begin
            msg[0]    <= SYM_ACK;
            msg[1]    <= lrx_pair.b1;
            msg_len   <= 2'd2;
            msg_idx   <= '0;
            ev.ack_rx <= 1'b1;
            timer     <= '0;
            state     <= S_TX_HDR;
          end else if (lrx_valid || lrx_err || timer >= TW'(RESP_TIMEOUT)) begin
            if (lrx_valid && lrx_pair.b0 == SYM_FAIL) ev.fail_rx <= 1'b1;
            else                                      ev.resp_timeout <= 1'b1;
            ev.pkt_resend <= 1'b1;
            scnt          <= '0;
            state         <= S_TX_SEND;   // fcnt stays full: resend from the register
          end
        end
        S_TX_STOP_SEND: begin
          if (ltx_take) begin
            if (stop_idx == 2'd0) begin
              stop_idx <= 2'd1;
            end else begin
              stop_idx    <= 2'd0;
              stop_sent   <= 1'b1;
              ev.stop_msg <= 1'b1;
              timer       <= '0;
              state       <= S_TX_HDR;
            end
          end
        end
        S_TERM_SEND: begin
          if (sq_start) begin
            state <= S_TERM_WAIT;
            timer <= '0;
          end
        end
        S_TERM_WAIT: begin
          timer <= timer + TW'(1);
          if (wave_done) sq_issued <= 1'b0;
          if (lrx_sq && !msg_busy) begin
            msg[0]       <= SYM_TXN_DONE;
            msg_len      <= 2'd1;
            msg_idx      <= '0;
            ev.term_done <= 1'b1;
            state        <= S_INIT;
          end else if (timer >= TW'(HS_TIMEOUT)) begin
            sq_issued <= 1'b0;
            if (retries == RW'(HS_RETRIES - 1)) begin
              state <= S_INIT;
            end else begin
              retries     <= retries + RW'(1);
              ev.hs_retry <= 1'b1;
              state       <= S_TERM_SEND;
            end
          end
        end

        // ---------------- receiver ----------------
        S_RX_IDLE: begin
          if (!got_pair) timer <= timer + TW'(1);
          if (lrx_valid) begin
            got_pair <= 1'b1;
            if (lrx_pair.b0 == SYM_PKT_START) begin
              scnt  <= (PW+1)'(1);
              timer <= '0;
              state <= S_RX_PKT;
            end else if (lrx_pair.b0 == SYM_STOP) begin
              stop_len <= lrx_pair.b1;
              timer    <= '0;
              state    <= S_RX_STOP;
            end
          end else if (!got_pair && timer >= TW'(RX_IDLE_TIMEOUT)) begin
            state <= S_INIT;
          end
        end
        S_RX_PKT: begin
          timer <= timer + TW'(1);
          if (lrx_err || timer >= TW'(RX_GAP_CLKS)) begin
            resp_pend      <= 1'b1;
            resp_pair      <= '{b0: SYM_FAIL, b1: 8'h00};
            ev.rx_pkt_fail <= 1'b1;
            state          <= S_RX_RESP;
          end else if (lrx_valid) begin
            timer <= '0;
            scnt  <= scnt + (PW+1)'(1);
            if (scnt == (PW+1)'(PAIRS - 1)) begin
              relay_idx <= '0;
              state     <= S_RX_RELAY;
            end
          end
        end
        S_RX_STOP: begin
          timer <= timer + TW'(1);
          if (lrx_valid) begin
            msg[0]      <= SYM_STOP;
            msg[1]      <= stop_len;
            msg[2]      <= lrx_pair.b0;
            msg_len     <= 2'd3;
            msg_idx     <= '0;
            ev.stop_msg <= 1'b1;
            state       <= S_RX_IDLE;
          end else if (lrx_err || timer >= TW'(RX_GAP_CLKS)) begin
            state <= S_RX_IDLE;
          end
        end
        S_RX_RELAY: begin
          if (utx_valid && utx_ready) relay_idx <= relay_idx + (BW+1)'(1);
          if (relay_idx == (BW+1)'(PKT_LEN)) begin
            resp_pend    <= 1'b1;
            resp_pair    <= '{b0: SYM_ACK, b1: buf_tag};
            ev.rx_pkt_ok <= 1'b1;
            state        <= S_RX_RESP;
          end
        end
        S_RX_RESP: begin
          if (ltx_take) begin
            resp_pend <= 1'b0;
            timer     <= '0;
            state     <= S_RX_IDLE;
          end
        end
        S_RX_TERM_WAIT: begin
          timer <= timer + TW'(1);
          if (lrx_valid && lrx_pair.b0 == SYM_STOP && hc_state == HC_IDLE) begin
            // our DONE was lost: the transmitter repeated its stop message
            hc_state    <= HC_SEND;
            cmd_pair    <= '{b0: SYM_DONE, b1: 8'h00};
            cmd_is_done <= 1'b1;
          end
          if (lrx_sq) begin
            state <= S_RX_TERM_REPLY;
          end else if (timer >= TW'(DONE_TIMEOUT)) begin
            state <= S_INIT;
          end
        end
        S_RX_TERM_REPLY: begin
          if (wave_done && !msg_busy) begin
            sq_issued    <= 1'b0;
            msg[0]       <= SYM_TXN_DONE;
            msg_len      <= 2'd1;
            msg_idx      <= '0;
            ev.term_done <= 1'b1;
            state        <= S_INIT;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  // Host messages are at most one per received pair and drain in a few
  // cycles, so a new one never finds the message register still busy.
  a_msg_free: assert property (@(posedge clk) disable iff (!rst_n)
                               (lrx_valid && is_tx && state != S_INIT &&
                                (lrx_pair.b0 == SYM_RESEND || lrx_pair.b0 == SYM_ACK)) |-> !msg_busy);
  // A square wave is only requested while the laser transmitter is idle.
  a_sq_idle: assert property (@(posedge clk) disable iff (!rst_n) sq_start |-> !ltx_busy);
  // The transmitter never sends a pair that has not been fetched yet.
  a_fetched: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_TX_SEND && ltx_valid) |->
                              ((BW+1)'({scnt, 1'b0}) + (BW+1)'(2) <= fcnt));
endmodule
