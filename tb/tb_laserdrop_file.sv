// tb_laserdrop_file: file-transfer workloads on two LaserDrop units.
//
// Two laserdrop_top instances at their default parameters (50 MHz clock) face
// each other through an optical channel model in which a receiver reads 1
// only while the opposite laser is at high power. Each unit has a host model
// (ld_file_host) behind a behavioural FT232H. Two transactions run back to
// back, both units returning to INIT in between:
//   1. A sends B a file of 200 packets (under 256, tags do not wrap) over a
//      clean channel. The payload rate must reach the 4 Mbit/s requirement.
//   2. B sends A a file of 2560 packets (over 256: the tag wraps ten times),
//      the size of the stress test, while the channel keeps failing: a data
//      bit is flipped in every 50th packet (the host's check catches it and
//      asks for the packet again by tag; a flip that happens to hit a stop
//      bit is a framing error and is answered with FAIL instead), both beams are blocked in the middle
//      of every 97th packet (FAIL and resend from the packet register), and
//      the return beam is blocked while every 131st ACK is under way (answer
//      time-out and resend; the receiving host then sees a duplicate).
// Each received file is checked byte for byte and by packet count, final
// length and the number of every kind of recovery. The rates of both
// transfers are printed; the first must be 4 Mbit/s or more and the second,
// despite the faults, at least 4 Mbit/s too.
module tb_laserdrop_file;
  import ld_pkg::*;
  localparam int CLK_NS  = 20;
  localparam int BIT_NS  = 8 * CLK_NS;
  localparam int NPKT1 = 200,  LAST1 = 17;
  localparam int NPKT2 = 2560, LAST2 = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(CLK_NS / 2) clk = ~clk;

  logic fsclk_a, fsdi_a, fsdo_a, fscts_a, fsclk_b, fsdi_b, fsdo_b, fscts_b;
  logic [1:0] glo_a, ghi_a, pd_a, nen_a, nidc_a, glo_b, ghi_b, pd_b, nen_b, nidc_b;
  ld_state_t st_a, st_b;
  logic tx_a, tx_b;
  ld_events_t ev_a, ev_b;
  laser_state_t ls_a [2], ls_b [2];

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
  ld_file_host u_ha (.clk, .fsclk(fsclk_a), .fsdi(fsdi_a), .fsdo(fsdo_a), .fscts(fscts_a));
  ld_file_host u_hb (.clk, .fsclk(fsclk_b), .fsdi(fsdi_b), .fsdo(fsdo_b), .fscts(fscts_b));

  // optical channel: block_xy cuts the x->y beams, flip_xy inverts a lane
  logic [1:0] block_ab = '0, block_ba = '0, flip_ba = '0;
  assign pd_b = ghi_a & ~block_ab;
  assign pd_a = (ghi_b & ~block_ba) ^ flip_ba;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(400ms);
    failures++;
    $display("watchdog: A %s, B %s", st_a.name(), st_b.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters of the current sender (B in the second transfer)
  int c_sent = 0, c_resend = 0, c_fail = 0, c_timeout = 0, c_fwd = 0, c_ack = 0;
  int c_rx_fail = 0, c_tag_req = 0;
  always @(posedge clk) if (rst_n) begin
    c_sent    += int'(ev_b.pkt_sent);
    c_resend  += int'(ev_b.pkt_resend);
    c_fail    += int'(ev_b.fail_rx);
    c_timeout += int'(ev_b.resp_timeout);
    c_fwd     += int'(ev_b.tag_fwd);
    c_ack     += int'(ev_b.ack_rx);
    c_rx_fail += int'(ev_a.rx_pkt_fail);
    c_tag_req += int'(ev_a.tag_req);
  end

  // faults during the second transfer, keyed to B's accepted packets
  bit inject = 0;
  int n_flip = 0, n_block = 0, n_ret_block = 0;
  initial begin
    wait (inject);
    while (inject) begin
      @(posedge clk);
      if (st_b == S_TX_SEND && u_b.u_ctrl.scnt == 9 && c_ack % 50 == 25 && c_ack / 50 >= n_flip) begin
        n_flip++;
        @(negedge pd_a[1]);               // start bit on the infrared lane
        #(3 * BIT_NS + BIT_NS / 4);
        flip_ba[1] = 1'b1;
        #(BIT_NS);
        flip_ba[1] = 1'b0;
      end else if (st_b == S_TX_SEND && u_b.u_ctrl.scnt == 20 && c_ack % 97 == 40 && c_ack / 97 >= n_block) begin
        n_block++;
        block_ba = 2'b11;
        #(25 * BIT_NS);
        block_ba = 2'b00;
      end else if (st_a == S_RX_RESP && c_ack % 131 == 60 && c_ack / 131 >= n_ret_block) begin
        n_ret_block++;
        block_ab = 2'b11;
        #(20 * BIT_NS);
        block_ab = 2'b00;
      end
    end
  end

  function automatic real mbps(int npkt, time t0, time t1);
    return real'(npkt - 1) * DATA_BYTES * 8.0 / (real'(t1 - t0) * 1.0e-9) / 1.0e6;
  endfunction

  initial begin
    real r1, r2;
    #(100ns);
    rst_n = 1'b1;
    #(2us);

    // ---- transfer 1: A -> B, 200 packets, clean channel ----
    fork
      u_ha.send_file(NPKT1, LAST1);
      u_hb.receive_file();
    join
    #(5us);
    check(st_a == S_INIT && st_b == S_INIT, "both units idle after transfer 1");
    check(u_hb.txn_start_seen, "transfer 1 start reported");
    check(u_hb.rx_npkt == NPKT1, $sformatf("transfer 1 packets %0d", u_hb.rx_npkt));
    check(u_hb.rx_last_len == LAST1, "transfer 1 final length");
    check(u_hb.n_good == NPKT1 && u_hb.n_data_err == 0, "transfer 1 data intact");
    check(u_hb.n_bad == 0 && u_hb.n_dup == 0 && u_ha.n_resend_req == 0, "transfer 1 clean");
    check(u_ha.n_unexpected == 0 && u_hb.n_unexpected == 0, "transfer 1 no stray bytes");
    r1 = mbps(NPKT1, u_hb.t_first, u_hb.t_last);
    $display("transfer 1: %0d packets, %0.2f Mbit/s of file data", NPKT1, r1);
    check(r1 >= 4.0, "transfer 1 rate >= 4 Mbit/s");

    // ---- transfer 2: B -> A, 2560 packets, faulty channel ----
    inject = 1;
    fork
      u_hb.send_file(NPKT2, LAST2);
      u_ha.receive_file();
    join
    inject = 0;
    #(5us);
    check(st_a == S_INIT && st_b == S_INIT, "both units idle after transfer 2");
    check(u_ha.rx_npkt == NPKT2, $sformatf("transfer 2 packets %0d", u_ha.rx_npkt));
    check(u_ha.rx_last_len == LAST2, "transfer 2 final length");
    check(u_ha.n_good == NPKT2 && u_ha.n_data_err == 0,
          $sformatf("transfer 2 data intact (%0d good, %0d bad bytes)", u_ha.n_good, u_ha.n_data_err));
    check(u_ha.n_unexpected == 0 && u_hb.n_unexpected == 0, "transfer 2 no stray bytes");
    r2 = mbps(NPKT2, u_ha.t_first, u_ha.t_last);
    $display("transfer 2: %0d packets, %0.2f Mbit/s of file data", NPKT2, r2);
    $display("  faults: %0d bit flips, %0d blocked packets, %0d lost ACKs", n_flip, n_block, n_ret_block);
    $display("  sender: %0d sent, %0d resent, %0d FAIL, %0d time-outs, %0d tags forwarded",
             c_sent, c_resend, c_fail, c_timeout, c_fwd);
    $display("  receiver host: %0d bad packets, %0d duplicates; receiver: %0d FAIL sent, %0d tags sent",
             u_ha.n_bad, u_ha.n_dup, c_rx_fail, c_tag_req);
    check(n_flip >= 40 && n_block >= 20 && n_ret_block >= 15, "faults injected throughout");
    // a flip that lands on a stop bit shows as a framing error (FAIL) instead
    check(u_ha.n_bad + (c_rx_fail - n_block) == n_flip && u_ha.n_bad >= n_flip - 3,
          "every flipped packet caught, by the host check or as a line error");
    check(c_tag_req == u_ha.n_bad && c_fwd == u_ha.n_bad && u_hb.n_resend_req == u_ha.n_bad,
          "every bad tag relayed back");
    check(c_fail >= n_block && c_rx_fail >= n_block, "blocked packets answered with FAIL");
    check(c_timeout >= n_ret_block, "lost ACKs recovered by time-out");
    check(u_ha.n_dup >= n_ret_block, "duplicates from lost ACKs discarded by the host");
    check(c_sent >= NPKT2 + n_flip, "every packet and every requested packet sent");
    check(r2 >= 4.0, "transfer 2 rate >= 4 Mbit/s despite faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
