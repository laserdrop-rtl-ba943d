// tb_laserdrop_top: end-to-end test of two LaserDrop units passing a file.
//
// Unit A (sender) and unit B (receiver) are two laserdrop_top instances at
// their default parameters, 50 MHz clock. Each has a behavioural FT232H and a
// behavioural host program. A's lasers drive B's receivers and B's lasers
// drive A's receivers through an optical channel model: a receiver sees 1 only
// when the laser is at high power; low power and off both read as 0.
//
// Sender host: asks for a transaction, keeps one packet ahead in the
// transceiver, sends the next packet on every forwarded ACK, sends the packet
// again for every forwarded RESEND tag, and sends the stop message (STOP,
// final length, final tag) once all packets are acknowledged. Packets are
// start byte, tag, 60 data bytes and 2 check bytes; the check bytes are a
// 16-bit sum standing in for the host's Hamming code. Receiver host: checks
// each packet's check bytes, stores good packets by tag, asks for bad ones
// again (RESEND, tag), and sends DONE once it has the stop message and no
// packet is outstanding. At the end the file assembled by the receiver host is
// compared byte for byte with the one sent, the final packet cut to the
// length given in the stop message.
//
// The channel injects, at fixed points: a blocked forward beam during the
// first handshake (the sender must repeat its square wave), a flipped data
// bit (host finds the error, tag relayed back, packet resent), a blocked
// beam in mid-packet (FAIL and resend from the packet register), a blocked
// return beam while an ACK is under way (answer time-out and resend), and a
// stretch with FSCTS low on the sender's transceiver. Every mechanism is
// counted and the test fails if any never happened. It also checks that the
// file moves at 4 Mbit/s or more in the error-free stretch.
module tb_laserdrop_top;
  import ld_pkg::*;
  localparam int NPKT      = 12;
  localparam int LAST_LEN  = 23;          // data bytes in the final packet
  localparam int CLK_NS    = 20;          // 50 MHz
  localparam int BIT_NS    = 8 * CLK_NS;  // laser bit

  logic clk = 1'b0, rst_n = 1'b0;
  always #(CLK_NS / 2) clk = ~clk;

  // unit A
  logic fsclk_a, fsdi_a, fsdo_a, fscts_a;
  logic [1:0] glo_a, ghi_a, pd_a, nen_a, nidc_a;
  ld_state_t st_a; logic tx_a; ld_events_t ev_a; laser_state_t ls_a [2];
  // unit B
  logic fsclk_b, fsdi_b, fsdo_b, fscts_b;
  logic [1:0] glo_b, ghi_b, pd_b, nen_b, nidc_b;
  ld_state_t st_b; logic tx_b; ld_events_t ev_b; laser_state_t ls_b [2];

  laserdrop_top u_a (
    .clk, .rst_n, .fsclk(fsclk_a), .fsdi(fsdi_a), .fsdo(fsdo_a), .fscts(fscts_a),
    .las_gate_lo(glo_a), .las_gate_hi(ghi_a), .pd_in(pd_a),
    .tia_nen(nen_a), .tia_nidc_en(nidc_a),
    .state(st_a), .is_tx(tx_a), .ev(ev_a), .las_state(ls_a)
  );
  laserdrop_top u_b (
    .clk, .rst_n, .fsclk(fsclk_b), .fsdi(fsdi_b), .fsdo(fsdo_b), .fscts(fscts_b),
    .las_gate_lo(glo_b), .las_gate_hi(ghi_b), .pd_in(pd_b),
    .tia_nen(nen_b), .tia_nidc_en(nidc_b),
    .state(st_b), .is_tx(tx_b), .ev(ev_b), .las_state(ls_b)
  );
  ft232h_model u_fta (.fsclk(fsclk_a), .fsdi(fsdi_a), .fsdo(fsdo_a), .fscts(fscts_a));
  ft232h_model u_ftb (.fsclk(fsclk_b), .fsdi(fsdi_b), .fsdo(fsdo_b), .fscts(fscts_b));

  // ---------------- optical channel ----------------
  logic [1:0] block_ab = 2'b00, block_ba = 2'b00, flip_ab = 2'b00;
  assign pd_b = (ghi_a & ~block_ab) ^ flip_ab;
  assign pd_a = ghi_b & ~block_ba;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(40ms);
    failures++;
    $display("watchdog: A state %s, B state %s", st_a.name(), st_b.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- file and packets ----------------
  function automatic logic [7:0] file_byte(int pkt, int i);
    return 8'((pkt * 37 + i * 11 + (pkt ^ i) * 5) ^ 8'h5A);
  endfunction

  function automatic int pkt_len(int pkt);
    return (pkt == NPKT - 1) ? LAST_LEN : DATA_BYTES;
  endfunction

  task automatic push_packet(int pkt);
    logic [15:0] sum;
    sum = 16'(pkt);
    u_fta.h2f_q.push_back(SYM_PKT_START);
    u_fta.h2f_q.push_back(8'(pkt));
    for (int i = 0; i < DATA_BYTES; i++) begin
      logic [7:0] b;
      b = (i < pkt_len(pkt)) ? file_byte(pkt, i) : 8'h00;   // final packet zero-padded
      u_fta.h2f_q.push_back(b);
      sum += 16'(b);
    end
    u_fta.h2f_q.push_back(sum[15:8]);
    u_fta.h2f_q.push_back(sum[7:0]);
  endtask

  // ---------------- sender host ----------------
  int a_next = 0, a_acked = 0, a_resend_req = 0;
  bit a_stop_sent = 0, a_txn_done = 0;
  bit acked [NPKT];
  initial begin
    @(posedge rst_n);
    #(2us);
    u_fta.h2f_q.push_back(SYM_TXN_START);
    push_packet(0); push_packet(1);
    a_next = 2;
    forever begin
      @(posedge clk);
      while (u_fta.f2h_q.size() >= 1) begin
        logic [7:0] sym;
        sym = u_fta.f2h_q[0];
        if (sym == SYM_TXN_DONE) begin
          void'(u_fta.f2h_q.pop_front());
          a_txn_done = 1;
        end else if (u_fta.f2h_q.size() >= 2) begin
          logic [7:0] t;
          void'(u_fta.f2h_q.pop_front());
          t = u_fta.f2h_q.pop_front();
          if (sym == SYM_ACK) begin
            if (!acked[t]) a_acked++;
            acked[t] = 1;
            if (a_next < NPKT) begin
              push_packet(a_next);
              a_next++;
            end
          end else if (sym == SYM_RESEND) begin
            a_resend_req++;
            push_packet(int'(t));
          end else begin
            check(0, $sformatf("sender host got symbol %02x", sym));
          end
        end else break;
      end
      if (!a_stop_sent && a_acked == NPKT) begin
        u_fta.h2f_q.push_back(SYM_STOP);
        u_fta.h2f_q.push_back(8'(LAST_LEN));
        u_fta.h2f_q.push_back(8'(NPKT - 1));
        a_stop_sent = 1;
      end
    end
  end

  // ---------------- receiver host ----------------
  logic [7:0] rx_file [NPKT][DATA_BYTES];
  bit   have [NPKT];
  bit   have_t [NPKT];
  bit   bad_out [NPKT];
  int   n_bad = 0, n_dup = 0, b_pkts = 0;
  int   stop_len = -1, stop_tag = -1;
  bit   b_txn_start = 0, b_txn_done = 0, b_done_sent = 0;
  time  t_first_pkt, t_last_pkt;
  time  t_pkt [NPKT];
  initial begin
    logic [7:0] m [$];
    forever begin
      @(posedge clk);
      while (u_ftb.f2h_q.size() > 0) m.push_back(u_ftb.f2h_q.pop_front());
      while (m.size() > 0) begin
        if (m[0] == SYM_TXN_START) begin
          void'(m.pop_front()); b_txn_start = 1;
        end else if (m[0] == SYM_TXN_DONE) begin
          void'(m.pop_front()); b_txn_done = 1;
        end else if (m[0] == SYM_STOP) begin
          if (m.size() < 3) break;
          void'(m.pop_front());
          stop_len = m.pop_front();
          stop_tag = m.pop_front();
        end else if (m[0] == SYM_PKT_START) begin
          logic [15:0] sum;
          int tag;
          if (m.size() < PKT_BYTES) break;
          void'(m.pop_front());
          tag = m.pop_front();
          sum = 16'(tag);
          for (int i = 0; i < DATA_BYTES; i++) begin
            logic [7:0] b;
            b = m.pop_front();
            if (tag < NPKT) rx_file[tag][i] = b;
            sum += 16'(b);
          end
          begin
            logic [15:0] got;
            got[15:8] = m.pop_front();
            got[7:0]  = m.pop_front();
            if (tag >= NPKT) check(0, "tag out of range");
            else if (got != sum) begin
              n_bad++;
              bad_out[tag] = 1;
              u_ftb.h2f_q.push_back(SYM_RESEND);
              u_ftb.h2f_q.push_back(8'(tag));
            end else begin
              if (have[tag]) n_dup++;
              have[tag] = 1;
              bad_out[tag] = 0;
              b_pkts++;
              if (!have_t[tag]) t_pkt[tag] = $time;
              have_t[tag] = 1;
              if (b_pkts == 1) t_first_pkt = $time;
              t_last_pkt = $time;
            end
          end
        end else begin
          check(0, $sformatf("receiver host got symbol %02x", m[0]));
          void'(m.pop_front());
        end
      end
      if (!b_done_sent && stop_len >= 0) begin
        bit all;
        all = 1;
        for (int k = 0; k < NPKT; k++) if (!have[k]) all = 0;
        if (all) begin
          u_ftb.h2f_q.push_back(SYM_DONE);
          b_done_sent = 1;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int c_hs_done = 0, c_hs_retry = 0, c_pkt_sent = 0, c_resend = 0, c_ack = 0,
      c_fail = 0, c_timeout = 0, c_tag_fwd = 0, c_rx_ok = 0, c_rx_fail = 0,
      c_tag_req = 0, c_stop = 0, c_done = 0, c_term = 0, c_pipe = 0,
      c_las_low = 0, c_las_high = 0, c_cts_stall = 0;
  always @(posedge clk) if (rst_n) begin
    c_hs_done  += int'(ev_a.hs_done) + int'(ev_b.hs_done);
    c_hs_retry += int'(ev_a.hs_retry);
    c_pkt_sent += int'(ev_a.pkt_sent);
    c_resend   += int'(ev_a.pkt_resend);
    c_ack      += int'(ev_a.ack_rx);
    c_fail     += int'(ev_a.fail_rx);
    c_timeout  += int'(ev_a.resp_timeout);
    c_tag_fwd  += int'(ev_a.tag_fwd);
    c_rx_ok    += int'(ev_b.rx_pkt_ok);
    c_rx_fail  += int'(ev_b.rx_pkt_fail);
    c_tag_req  += int'(ev_b.tag_req);
    c_stop     += int'(ev_a.stop_msg) + int'(ev_b.stop_msg);
    c_done     += int'(ev_a.done_msg) + int'(ev_b.done_msg);
    c_term     += int'(ev_a.term_done) + int'(ev_b.term_done);
    // two-stage pipeline: host fetch and laser send in the same cycle
    if (u_a.u_ctrl.state == S_TX_SEND && u_a.u_ctrl.urx_take && u_a.u_ltx.busy) c_pipe++;
    if (ls_a[0] == LAS_LOW)  c_las_low++;
    if (ls_a[0] == LAS_HIGH) c_las_high++;
    if (!fscts_a && u_a.u_fs.tx_pend) c_cts_stall++;
  end

  // ---------------- fault injection ----------------
  int frames_ab = 0;
  always @(negedge pd_b[0]) frames_ab++;

  initial begin
    @(posedge rst_n);
    // block A->B while A sends its first handshake wave
    block_ab = 2'b11;
    wait (st_a == S_HS_WAIT);
    wait (st_a == S_HS_SEND);
    block_ab = 2'b00;
    // packet 3: flip one data bit on the green lane
    wait (c_ack == 3 && st_a == S_TX_SEND && u_a.u_ctrl.scnt == 10);
    @(negedge pd_b[0]);               // a start bit
    #(2 * BIT_NS + BIT_NS / 4);
    flip_ab[0] = 1'b1;
    #(BIT_NS);
    flip_ab[0] = 1'b0;
    // packet 5: block both beams for 30 bit periods in mid-packet
    wait (c_ack >= 5 && st_a == S_TX_SEND && u_a.u_ctrl.scnt == 12);
    block_ab = 2'b11;
    #(30 * BIT_NS);
    block_ab = 2'b00;
    // packet 7: block the return beam while the ACK is sent
    wait (c_ack >= 7 && st_b == S_RX_RESP);
    block_ba = 2'b11;
    #(20 * BIT_NS);
    block_ba = 2'b00;
    // CTS low on the sender's transceiver for a while
    wait (c_ack >= 9);
    u_fta.cts_en = 1'b0;
    #(30us);
    u_fta.cts_en = 1'b1;
  end

  // ---------------- main ----------------
  initial begin
    #(100ns);
    rst_n = 1'b1;
    wait (a_txn_done && b_txn_done);
    #(5us);
    check(st_a == S_INIT && st_b == S_INIT, "both units back in INIT");
    check(b_txn_start, "receiver host told of transaction start");
    check(stop_len == LAST_LEN && stop_tag == NPKT - 1, "stop message relayed");
    for (int k = 0; k < NPKT; k++) begin
      check(have[k], $sformatf("packet %0d received", k));
      for (int i = 0; i < pkt_len(k); i++)
        if (rx_file[k][i] != file_byte(k, i)) begin
          check(0, $sformatf("file byte %0d of packet %0d", i, k));
          break;
        end
    end
    checks++;
    check(u_fta.bad_frames == 0 && u_ftb.bad_frames == 0, "transceiver frames");
    check(ls_a[0] == LAS_OFF && ls_b[0] == LAS_OFF, "lasers off after the transaction");
    check(nen_a == 2'b00 && nidc_a == 2'b00, "TIA enabled");
    // rate over the error-free opening packets 0..2
    begin
      real mbps;
      mbps = 2.0 * DATA_BYTES * 8.0 / (real'(t_pkt[2] - t_pkt[0]) * 1.0e-9) / 1.0e6;
      $display("payload rate over packets 0..2: %0.2f Mbit/s", mbps);
      check(mbps >= 4.0, "payload rate at least 4 Mbit/s");
    end
    $display("mechanisms: hs_done=%0d hs_retry=%0d pkt_sent=%0d resend=%0d ack=%0d fail=%0d timeout=%0d",
             c_hs_done, c_hs_retry, c_pkt_sent, c_resend, c_ack, c_fail, c_timeout);
    $display("            tag_fwd=%0d rx_ok=%0d rx_fail=%0d tag_req=%0d stop=%0d done=%0d term=%0d",
             c_tag_fwd, c_rx_ok, c_rx_fail, c_tag_req, c_stop, c_done, c_term);
    $display("            pipeline=%0d laser_low=%0d laser_high=%0d cts_stall=%0d bad_pkts=%0d dup=%0d",
             c_pipe, c_las_low, c_las_high, c_cts_stall, n_bad, n_dup);
    check(c_hs_done >= 2,   "handshake");
    check(c_hs_retry >= 1,  "handshake retry");
    check(c_pipe > 0,       "fetch/send pipeline overlap");
    check(c_resend >= 3,    "packet resend");
    check(c_ack >= NPKT,    "ACK");
    check(c_fail >= 1,      "FAIL");
    check(c_timeout >= 1,   "answer time-out");
    check(c_tag_fwd >= 1,   "tag forwarded to sender host");
    check(c_tag_req >= 1,   "tag sent by receiver");
    check(n_bad >= 1,       "corrupted packet caught by host");
    check(c_rx_fail >= 1,   "receiver FAIL");
    check(c_rx_ok >= NPKT,  "receiver ACK");
    check(c_stop >= 2,      "stop message");
    check(c_done >= 2,      "DONE");
    check(c_term == 2,      "closing handshake");
    check(c_las_low > 0 && c_las_high > 0, "low and high laser levels");
    check(c_cts_stall > 0,  "FSCTS stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
