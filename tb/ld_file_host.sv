// ld_file_host: behavioural model of a computer running the LaserDrop
// application, attached to one unit through a behavioural FT232H. Not
// synthesizable; used by testbenches.
//
// send_file(npkt, last_len) plays the sending side: it asks for a
// transaction, keeps two packets queued ahead in the transceiver, queues the
// next packet on every new ACK, queues a packet again on every RESEND tag, and
// after the last ACK sends the stop message (STOP, final length, final tag);
// it returns when the unit reports the transaction complete.
// receive_file() plays the receiving side: it checks every relayed packet,
// keeps the good ones, returns RESEND with the tag of a bad one, and sends
// DONE once it has the stop message and every packet up to the final one; it
// returns when the unit reports the transaction complete.
//
// Packets are start byte, tag (packet number modulo 256), 60 data bytes and 2
// check bytes. The check bytes are a 16-bit sum standing in for the
// application's Hamming code: it detects the injected errors but corrects
// none, so every damaged packet is asked for again. Tags wrap after 256
// packets; both sides resolve a tag to the packet number within 128 of the
// oldest outstanding packet, which is unambiguous because far fewer than 128
// packets are ever in flight. File contents are a fixed function of packet
// number and byte index (file_byte), so the receiving test can check every
// byte without a copy of the file.
module ld_file_host (
  input  logic clk,
  input  logic fsclk,
  input  logic fsdi,
  output logic fsdo,
  output logic fscts
);
  import ld_pkg::*;

  ft232h_model u_ft (.fsclk, .fsdi, .fsdo, .fscts);

  function automatic logic [7:0] file_byte(int pkt, int i);
    return 8'((pkt * 37 + i * 11 + (pkt ^ i) * 5) ^ 8'h5A);
  endfunction

  // statistics, read by the testbench
  int  n_sent_pkts = 0, n_resend_req = 0, n_bad = 0, n_dup = 0, n_good = 0;
  int  n_unexpected = 0, n_data_err = 0, rx_npkt = -1, rx_last_len = -1;
  bit  txn_start_seen = 0, txn_done_seen = 0;
  time t_first = 0, t_last = 0;

  // packet number with tag t that lies within 128 packets of ref
  function automatic int nearest(int ref_pkt, logic [7:0] t);
    return ref_pkt - 128 + int'(8'(t - 8'(ref_pkt - 128)));
  endfunction

  task automatic push_packet(int pkt, int npkt, int last_len);
    logic [15:0] sum;
    int len;
    len = (pkt == npkt - 1) ? last_len : DATA_BYTES;
    sum = 16'(pkt[7:0]);
    u_ft.h2f_q.push_back(SYM_PKT_START);
    u_ft.h2f_q.push_back(8'(pkt));
    for (int i = 0; i < DATA_BYTES; i++) begin
      logic [7:0] b;
      b = (i < len) ? file_byte(pkt, i) : 8'h00;
      u_ft.h2f_q.push_back(b);
      sum += 16'(b);
    end
    u_ft.h2f_q.push_back(sum[15:8]);
    u_ft.h2f_q.push_back(sum[7:0]);
    n_sent_pkts++;
  endtask

  task automatic send_file(input int npkt, input int last_len);
    bit acked [];
    int next, base, n_acked;
    acked = new[npkt];
    txn_done_seen = 0;
    u_ft.h2f_q.push_back(SYM_TXN_START);
    next = 0;
    while (next < 2 && next < npkt) begin
      push_packet(next, npkt, last_len);
      next++;
    end
    base = 0;
    n_acked = 0;
    while (!txn_done_seen) begin
      @(posedge clk);
      while (u_ft.f2h_q.size() > 0) begin
        logic [7:0] sym, t;
        int p;
        sym = u_ft.f2h_q[0];
        if (sym == SYM_TXN_DONE) begin
          void'(u_ft.f2h_q.pop_front());
          txn_done_seen = 1;
          break;
        end
        if (u_ft.f2h_q.size() < 2) break;
        void'(u_ft.f2h_q.pop_front());
        t = u_ft.f2h_q.pop_front();
        if (sym == SYM_ACK) begin
          p = nearest(base, t);
          if (p >= 0 && p < next && !acked[p]) begin
            acked[p] = 1;
            n_acked++;
            while (base < npkt && acked[base]) base++;
            if (next < npkt) begin
              push_packet(next, npkt, last_len);
              next++;
            end
          end
        end else if (sym == SYM_RESEND) begin
          p = nearest(next - 1, t);
          n_resend_req++;
          if (p >= 0) push_packet(p, npkt, last_len);
        end else begin
          n_unexpected++;
        end
      end
      if (n_acked == npkt && base == npkt) begin
        u_ft.h2f_q.push_back(SYM_STOP);
        u_ft.h2f_q.push_back(8'(last_len));
        u_ft.h2f_q.push_back(8'(npkt - 1));
        base = npkt + 1;   // stop message sent
      end
    end
  endtask

  task automatic receive_file();
    bit have [int];
    logic [7:0] m [$];
    int lo, stop_tag;
    bit done_sent;
    have.delete();
    lo = 0;
    stop_tag = -1;
    done_sent = 0;
    txn_start_seen = 0;
    txn_done_seen = 0;
    rx_npkt = -1;
    while (!txn_done_seen) begin
      @(posedge clk);
      while (u_ft.f2h_q.size() > 0) m.push_back(u_ft.f2h_q.pop_front());
      while (m.size() > 0) begin
        if (m[0] == SYM_TXN_START) begin
          void'(m.pop_front());
          txn_start_seen = 1;
        end else if (m[0] == SYM_TXN_DONE) begin
          void'(m.pop_front());
          txn_done_seen = 1;
        end else if (m[0] == SYM_STOP) begin
          if (m.size() < 3) break;
          void'(m.pop_front());
          rx_last_len = m.pop_front();
          stop_tag    = m.pop_front();
        end else if (m[0] == SYM_PKT_START) begin
          logic [15:0] sum, got;
          logic [7:0] t, d [DATA_BYTES];
          int p;
          if (m.size() < PKT_BYTES) break;
          void'(m.pop_front());
          t = m.pop_front();
          sum = 16'(t);
          for (int i = 0; i < DATA_BYTES; i++) begin
            d[i] = m.pop_front();
            sum += 16'(d[i]);
          end
          got[15:8] = m.pop_front();
          got[7:0]  = m.pop_front();
          p = nearest(lo, t);
          if (got != sum) begin
            n_bad++;
            u_ft.h2f_q.push_back(SYM_RESEND);
            u_ft.h2f_q.push_back(t);
          end else if (have.exists(p)) begin
            n_dup++;
          end else begin
            have[p] = 1;
            n_good++;
            if (n_good == 1) t_first = $time;
            t_last = $time;
            // compare the full data field; the final packet's tail is padding
            for (int i = 0; i < DATA_BYTES; i++)
              if (d[i] != file_byte(p, i) && d[i] != 8'h00) n_data_err++;
            while (have.exists(lo)) lo++;
          end
        end else begin
          n_unexpected++;
          void'(m.pop_front());
        end
      end
      if (!done_sent && stop_tag >= 0) begin
        int last;
        last = nearest(lo, 8'(stop_tag));
        if (lo == last + 1) begin       // every packet up to the final one is here
          rx_npkt = last + 1;
          u_ft.h2f_q.push_back(SYM_DONE);
          done_sent = 1;
        end
      end
    end
  endtask
endmodule
