// tb_laser_link_tx: self-checking test of the dual-laser transmit stage.
//
// Feeds random byte pairs with random valid gaps. A cycle-accurate decoder per
// lane checks each UART frame (start 0, 8 data bits LSB first, stop 1, each
// bit CLKS_PER_BIT cycles) against the pair that was accepted, and checks that
// both lanes start every frame in the same cycle and that a pair takes 10 bit
// periods. Then it requests a square wave and checks its shape: HS_BITS
// alternating bit periods starting at 0 on both lanes, then idle 1, with busy
// high for exactly HS_BITS bit periods. A pair offered during the square
// wave must wait.
module tb_laser_link_tx;
  import ld_pkg::*;
  localparam int unsigned CPB = 8, HSB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pair_valid = 1'b0, pair_ready, sq_start = 1'b0, busy;
  byte_pair_t pair;
  logic [1:0] txd;
  int checks = 0, failures = 0, cyc = 0;
  byte_pair_t exp_q[$];
  int acc_cyc_q[$];

  laser_link_tx #(.CLKS_PER_BIT(CPB), .HS_BITS(HSB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Sample both lanes every cycle; decode frames when not in square-wave test.
  logic decode_on = 1'b1;
  logic [1:0] prev = 2'b11;
  int in_frame = 0, fcyc = 0;
  logic [9:0] bits0, bits1;
  int n_pairs = 0;
  always @(posedge clk) begin
    cyc++;
    if (pair_valid && pair_ready) begin
      exp_q.push_back(pair);
      acc_cyc_q.push_back(cyc);
    end
    if (decode_on && rst_n) begin
      if (!in_frame) begin
        if (txd != 2'b11) begin
          check(txd == 2'b00, "both lanes start together");
          in_frame = 1; fcyc = 0;
        end
      end
      if (in_frame) begin
        // sample in the middle of each bit
        if (fcyc % CPB == CPB / 2) begin
          bits0[fcyc / CPB] = txd[0];
          bits1[fcyc / CPB] = txd[1];
        end
        fcyc++;
        if (fcyc == 10 * CPB) begin
          byte_pair_t e;
          int ac;
          in_frame = 0;
          e = exp_q.pop_front();
          ac = acc_cyc_q.pop_front();
          n_pairs++;
          check(bits0[0] == 0 && bits1[0] == 0 && bits0[9] == 1 && bits1[9] == 1, "framing");
          check(bits0[8:1] == e.b0 && bits1[8:1] == e.b1,
                $sformatf("pair %02x%02x expected %02x%02x", bits0[8:1], bits1[8:1], e.b0, e.b1));
        end
      end
    end
  end

  initial begin
    pair = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      pair = byte_pair_t'($urandom);
      pair_valid = 1'b1;
      @(posedge clk);
      while (!pair_ready) @(posedge clk);
      @(negedge clk);
      pair_valid = 1'b0;
      if (i % 4 == 0) repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_pairs == 50, "50 pairs decoded");
    // throughput: back-to-back pairs are 10 bit periods apart
    begin
      int t1, t2;
      @(negedge clk);
      pair = 16'h1234; pair_valid = 1'b1;
      @(posedge clk); t1 = cyc;
      @(negedge clk); pair = 16'h5678;
      @(posedge clk); while (!pair_ready) @(posedge clk);
      t2 = cyc;
      @(negedge clk); pair_valid = 1'b0;
      check(t2 - t1 == 10 * CPB, $sformatf("pair period %0d cycles", t2 - t1));
    end
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    // square wave
    decode_on = 1'b0;
    @(negedge clk);
    sq_start = 1'b1;
    pair = 16'hAAAA; pair_valid = 1'b1;   // must wait for the wave
    @(negedge clk);
    sq_start = 1'b0;
    check(busy, "busy during square wave");
    for (int k = 0; k < HSB; k++) begin
      for (int c = 0; c < CPB; c++) begin
        if (c == CPB / 2) check(txd == {2{1'(k % 2)}}, $sformatf("square bit %0d: %b", k, txd));
        if (k == HSB - 1 && c == CPB - 1) ;
        else check(!pair_ready, "pair held off during wave");
        @(negedge clk);
      end
    end
    check(txd == 2'b11 && !busy, "idle after square wave");
    decode_on = 1'b1;
    exp_q.delete(); acc_cyc_q.delete();
    pair_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
