// tb_laser_link_rx: self-checking test of the dual-laser receive stage.
//
// A behavioural transmitter drives the green and infrared lines with UART
// frames (8 clocks per bit), each lane with its own start delay so the two
// frames of a pair arrive skewed. Checks: pairs are assembled correctly for
// skews up to a few bits in either direction; a bad stop bit on one lane gives
// `err` and no pair; a byte on one lane alone gives `err` after the skew
// limit; the handshake square wave is reported only when it appears on both
// lanes, and only while sq_en is high.
module tb_laser_link_rx;
  import ld_pkg::*;
  localparam int unsigned CPB = 8;
  localparam int BIT_NS = CPB * 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] rxd = 2'b11;
  logic sq_en = 1'b0, pair_valid, err, sq_detect;
  byte_pair_t pair;
  int checks = 0, failures = 0, n_pair = 0, n_err = 0, n_sq = 0;
  byte_pair_t exp_q[$];
  bit sq_phase = 0;

  laser_link_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pair_valid && sq_phase) begin
      // the handshake wave itself also decodes as a frame (0xD5 per lane)
      check(pair == 16'hD5D5, "only the wave's own frame appears");
    end else if (pair_valid) begin
      n_pair++;
      if (exp_q.size() == 0) check(0, "unexpected pair");
      else begin
        byte_pair_t e;
        e = exp_q.pop_front();
        check(pair == e, $sformatf("pair %04x expected %04x", pair, e));
      end
    end
    if (err) n_err++;
    if (sq_detect) n_sq++;
  end

  task automatic lane_frame(input int l, input logic [7:0] b, input int delay_ns,
                            input bit bad_stop);
    logic [9:0] fr;
    fr = {~bad_stop, b, 1'b0};
    #(delay_ns);
    for (int k = 0; k < 10; k++) begin
      rxd[l] = fr[k];
      #(BIT_NS);
    end
    rxd[l] = 1'b1;
  endtask

  task automatic send_pair(input byte_pair_t p, input int skew_ns, input bit bad0, input bit bad1);
    fork
      lane_frame(0, p.b0, skew_ns < 0 ? -skew_ns : 0, bad0);
      lane_frame(1, p.b1, skew_ns > 0 ? skew_ns : 0, bad1);
    join
  endtask

  task automatic lane_wave(input int l, input int nbits);
    for (int k = 0; k < nbits; k++) begin
      rxd[l] = (k % 2 == 1);
      #(BIT_NS);
    end
    rxd[l] = 1'b1;
  endtask

  initial begin
    #27 rst_n = 1'b1;
    #400;
    // pairs with skew between -2 and +2 bits
    for (int i = 0; i < 40; i++) begin
      byte_pair_t p;
      p = byte_pair_t'($urandom);
      exp_q.push_back(p);
      send_pair(p, $urandom_range(0, 4 * BIT_NS) - 2 * BIT_NS, 0, 0);
      #($urandom_range(0, 200));
    end
    #(3 * BIT_NS);
    check(n_pair == 40 && n_err == 0, $sformatf("40 skewed pairs (%0d, err %0d)", n_pair, n_err));
    // bad stop bit on the infrared lane
    send_pair(16'h1234, 0, 0, 1);
    #(6 * BIT_NS);
    check(n_pair == 40 && n_err == 1, "bad stop on one lane gives err");
    // bad stop on the green lane
    send_pair(16'h4321, 30, 1, 0);
    #(6 * BIT_NS);
    check(n_pair == 40 && n_err == 2, "bad stop on green lane gives err");
    // green lane byte alone
    lane_frame(0, 8'h77, 0, 0);
    #(8 * BIT_NS);
    check(n_pair == 40 && n_err == 3, "lone byte times out");
    // link works again
    exp_q.push_back(16'hBEEF);
    send_pair(16'hBEEF, 0, 0, 0);
    #(3 * BIT_NS);
    check(n_pair == 41, "pair after errors");
    // square waves
    sq_phase = 1;
    sq_en = 1'b1;
    #(2 * BIT_NS);
    fork lane_wave(0, 8); lane_wave(1, 8); join
    #(4 * BIT_NS);
    check(n_sq == 1, "square wave on both lanes detected");
    lane_wave(0, 8);
    #(8 * BIT_NS);
    check(n_sq == 1, "square wave on one lane only is not a handshake");
    fork lane_wave(0, 8); begin #(BIT_NS); lane_wave(1, 8); end join
    #(4 * BIT_NS);
    check(n_sq == 2, "skewed square waves detected");
    sq_en = 1'b0;
    fork lane_wave(0, 8); lane_wave(1, 8); join
    #(4 * BIT_NS);
    check(n_sq == 2, "no detection while disabled");
    check(exp_q.size() == 0, "all pairs delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
