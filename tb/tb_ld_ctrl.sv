// tb_ld_ctrl: self-checking test of the transaction controller.
//
// The controller is tested on its own, with a real packet register, a
// behavioural laser link (a pair occupies the link for 80 cycles, a square
// wave for 64) and byte streams standing in for the host. The testbench plays
// the peer unit at the level of byte pairs and the host at the level of bytes.
// First as transmitter: handshake, one packet (checked pair by pair, and
// checked to start going out before the host has delivered all of it), a FAIL
// (same packet again), a matching ACK (forwarded to the host), a RESEND tag
// (forwarded), a silent peer (resend after RESP_TIMEOUT), the stop message,
// DONE and the closing handshake. Then as receiver: answering the handshake,
// a whole packet (relayed to the host and acknowledged with its tag), a packet
// cut by a line error (FAIL), a RESEND tag from the host, a stop message
// (relayed), DONE from the host and the closing handshake.
module tb_ld_ctrl;
  import ld_pkg::*;
  localparam int RESP_TO = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       urx_valid = 1'b0, urx_ready;
  logic [7:0] urx_data = '0;
  logic       utx_valid, utx_ready;
  logic [7:0] utx_data;
  logic       ltx_valid, ltx_ready, sq_start, ltx_busy, laser_en;
  byte_pair_t ltx_pair;
  logic       lrx_valid = 1'b0, lrx_err = 1'b0, lrx_sq = 1'b0, sq_en;
  byte_pair_t lrx_pair = '0;
  logic       buf_wr_en;
  logic [4:0] buf_wr_idx, buf_rd_pair_idx;
  byte_pair_t buf_wr_pair, buf_rd_pair;
  logic [5:0] buf_rd_byte_idx;
  logic [7:0] buf_rd_byte, buf_tag;
  ld_state_t  state;
  logic       is_tx;
  ld_events_t ev;

  ld_ctrl #(.HS_TIMEOUT(1000), .HS_RETRIES(4), .RESP_TIMEOUT(RESP_TO),
            .RX_GAP_CLKS(1000), .RX_IDLE_TIMEOUT(20000), .DONE_TIMEOUT(20000)) dut (.*);
  packet_buffer u_buf (
    .clk, .wr_en(buf_wr_en), .wr_idx(buf_wr_idx), .wr_pair(buf_wr_pair),
    .rd_pair_idx(buf_rd_pair_idx), .rd_pair(buf_rd_pair),
    .rd_byte_idx(buf_rd_byte_idx), .rd_byte(buf_rd_byte), .tag(buf_tag)
  );

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural laser link
  int link_cnt = 0, n_sq = 0;
  byte_pair_t sent_q[$];
  int sent_cyc_q[$];
  assign ltx_ready = (link_cnt == 0);
  assign ltx_busy  = (link_cnt != 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sq_start) begin
      check(link_cnt == 0, "square wave only on an idle link");
      link_cnt <= 64;
      n_sq     <= n_sq + 1;
    end else if (rst_n && ltx_valid && ltx_ready) begin
      sent_q.push_back(ltx_pair);
      sent_cyc_q.push_back(cyc);
      link_cnt <= 80;
    end else if (link_cnt > 0) begin
      link_cnt <= link_cnt - 1;
    end
  end

  // host side
  logic [7:0] host_q[$];
  int urx_taken = 0;
  logic utx_ready_r = 1'b1;
  always @(posedge clk) utx_ready_r <= ($urandom_range(0, 3) != 0);
  assign utx_ready = utx_ready_r;
  always @(posedge clk) if (rst_n && utx_valid && utx_ready) host_q.push_back(utx_data);
  always @(posedge clk) if (rst_n && urx_valid && urx_ready) urx_taken++;

  task automatic host_send(input logic [7:0] b);
    @(negedge clk);
    urx_valid = 1'b1; urx_data = b;
    @(posedge clk);
    while (!urx_ready) @(posedge clk);
    @(negedge clk);
    urx_valid = 1'b0;
    // the transceiver port delivers a byte at most every 50 cycles
    repeat (20) @(posedge clk);
  endtask

  task automatic peer_pair(input logic [7:0] b0, input logic [7:0] b1);
    @(negedge clk);
    lrx_valid = 1'b1; lrx_pair = '{b0: b0, b1: b1};
    @(negedge clk);
    lrx_valid = 1'b0;
    repeat (80) @(posedge clk);
  endtask

  task automatic peer_sq();
    @(negedge clk);
    lrx_sq = 1'b1;
    @(negedge clk);
    lrx_sq = 1'b0;
  endtask

  task automatic wait_pairs(input int n, input int max_cycles);
    int c;
    c = 0;
    while (sent_q.size() < n && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(sent_q.size() >= n, $sformatf("%0d pairs sent (got %0d)", n, sent_q.size()));
  endtask

  task automatic wait_host(input int n, input int max_cycles);
    int c;
    c = 0;
    while (host_q.size() < n && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(host_q.size() >= n, $sformatf("%0d bytes to host (got %0d)", n, host_q.size()));
  endtask

  logic [7:0] pkt [64];

  task automatic check_packet_pairs(input string what);
    for (int i = 0; i < 32; i++) begin
      byte_pair_t p;
      p = sent_q.pop_front();
      void'(sent_cyc_q.pop_front());
      check(p.b0 == pkt[2*i] && p.b1 == pkt[2*i+1], $sformatf("%s pair %0d: %h %h", what, i, p.b0, p.b1));
    end
  endtask

  initial begin
    pkt[0] = SYM_PKT_START;
    pkt[1] = 8'd42;
    for (int i = 2; i < 64; i++) pkt[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(state == S_INIT && !laser_en && sq_en, "INIT: laser off, listening");

    // ================= transmitter =================
    host_send(SYM_TXN_START);
    repeat (2) @(posedge clk);
    check(n_sq == 1 && is_tx && laser_en, "handshake wave sent");
    // no answer: the wave is repeated after the time-out
    repeat (1100) @(posedge clk);
    check(n_sq == 2 && ev.hs_retry == 0, "handshake repeated");
    peer_sq();
    @(posedge clk);
    check(state == S_TX_HDR, "handshake done");

    // packet: the first pair must go out before the last byte is fetched
    fork
      for (int i = 0; i < 64; i++) host_send(pkt[i]);
      begin
        wait (sent_q.size() == 1);
        check(urx_taken < 1 + 10, "sending starts while fetching (pipeline)");
      end
    join
    wait_pairs(32, 5000);
    check_packet_pairs("first send");
    repeat (100) @(posedge clk);
    check(state == S_TX_WAIT_RESP, "waiting for the answer");
    // FAIL: the same packet again
    peer_pair(SYM_FAIL, 8'h00);
    wait_pairs(32, 5000);
    check_packet_pairs("after FAIL");
    repeat (100) @(posedge clk);
    // wrong tag is not an ACK
    host_q.delete();
    peer_pair(SYM_ACK, 8'd43);
    wait_pairs(32, 5000);
    check_packet_pairs("after ACK with wrong tag");
    repeat (100) @(posedge clk);
    // silence: resend after the time-out
    begin
      int t0, t1;
      t0 = cyc;
      wait_pairs(1, RESP_TO + 200);
      t1 = sent_cyc_q[0];
      check(t1 - t0 >= RESP_TO - 200 && t1 - t0 <= RESP_TO + 100, $sformatf("answer time-out %0d", t1 - t0));
      wait_pairs(32, 5000);
      check_packet_pairs("after time-out");
    end
    repeat (100) @(posedge clk);
    // RESEND tag from the peer while waiting: forwarded, still waiting
    peer_pair(SYM_RESEND, 8'd7);
    wait_host(2, 100);
    check(host_q[0] == SYM_RESEND && host_q[1] == 8'd7, "RESEND tag forwarded");
    host_q.delete();
    // matching ACK
    peer_pair(SYM_ACK, 8'd42);
    wait_host(2, 100);
    check(host_q[0] == SYM_ACK && host_q[1] == 8'd42, "ACK forwarded");
    host_q.delete();
    check(state == S_TX_HDR, "ready for the next message");
    // stop message
    host_send(SYM_STOP); host_send(8'd17); host_send(8'd42);
    wait_pairs(2, 1000);
    begin
      byte_pair_t p0, p1;
      p0 = sent_q.pop_front(); p1 = sent_q.pop_front();
      void'(sent_cyc_q.pop_front()); void'(sent_cyc_q.pop_front());
      check(p0.b0 == SYM_STOP && p0.b1 == 8'd17 && p1.b0 == 8'd42, "stop message pairs");
    end
    repeat (100) @(posedge clk);
    peer_pair(SYM_DONE, 8'h00);
    check(n_sq == 3, "closing wave sent after DONE");
    peer_sq();
    wait_host(1, 100);
    check(host_q[0] == SYM_TXN_DONE, "transaction complete to host");
    host_q.delete();
    repeat (3) @(posedge clk);
    check(state == S_INIT && !laser_en, "back in INIT");

    // ================= receiver =================
    peer_sq();
    repeat (70) @(posedge clk);
    check(n_sq == 4 && !is_tx, "handshake answered");
    wait_host(1, 200);
    check(host_q[0] == SYM_TXN_START, "transaction start to host");
    host_q.delete();
    // a whole packet
    for (int i = 0; i < 32; i++) peer_pair(pkt[2*i], pkt[2*i+1]);
    wait_host(64, 1000);
    for (int i = 0; i < 64; i++) check(host_q[i] == pkt[i], $sformatf("relayed byte %0d", i));
    host_q.delete();
    wait_pairs(1, 300);
    begin
      byte_pair_t p;
      p = sent_q.pop_front(); void'(sent_cyc_q.pop_front());
      check(p.b0 == SYM_ACK && p.b1 == 8'd42, "ACK with tag");
    end
    repeat (100) @(posedge clk);
    // a packet cut by a line error
    for (int i = 0; i < 5; i++) peer_pair(pkt[2*i], pkt[2*i+1]);
    @(negedge clk); lrx_err = 1'b1; @(negedge clk); lrx_err = 1'b0;
    wait_pairs(1, 300);
    begin
      byte_pair_t p;
      p = sent_q.pop_front(); void'(sent_cyc_q.pop_front());
      check(p.b0 == SYM_FAIL, "FAIL after line error");
    end
    check(host_q.size() == 0, "nothing relayed for a lost packet");
    repeat (100) @(posedge clk);
    // RESEND tag from the host
    host_send(SYM_RESEND); host_send(8'd9);
    wait_pairs(1, 300);
    begin
      byte_pair_t p;
      p = sent_q.pop_front(); void'(sent_cyc_q.pop_front());
      check(p.b0 == SYM_RESEND && p.b1 == 8'd9, "RESEND tag sent to the peer");
    end
    repeat (100) @(posedge clk);
    // stop message relayed
    peer_pair(SYM_STOP, 8'd17);
    peer_pair(8'd42, 8'h00);
    wait_host(3, 200);
    check(host_q[0] == SYM_STOP && host_q[1] == 8'd17 && host_q[2] == 8'd42, "stop message relayed");
    host_q.delete();
    // DONE from the host
    host_send(SYM_DONE);
    wait_pairs(1, 300);
    begin
      byte_pair_t p;
      p = sent_q.pop_front(); void'(sent_cyc_q.pop_front());
      check(p.b0 == SYM_DONE, "DONE sent to the peer");
    end
    repeat (100) @(posedge clk);
    check(state == S_RX_TERM_WAIT, "waiting for the closing wave");
    peer_sq();
    repeat (70) @(posedge clk);
    check(n_sq == 5, "closing wave answered");
    wait_host(1, 200);
    check(host_q[0] == SYM_TXN_DONE, "transaction complete to host");
    check(state == S_INIT, "receiver back in INIT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
