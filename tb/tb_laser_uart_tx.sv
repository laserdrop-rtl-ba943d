// tb_laser_uart_tx: self-checking test of the single-laser UART transmitter.
//
// Sends random bytes, back to back and with gaps, and decodes the line
// independently by timing: it waits for the start edge, checks that the line
// holds each bit for exactly CLKS_PER_BIT cycles at the expected level (start
// 0, data LSB first, stop 1) and that `done` pulses when the stop bit ends.
// It also checks that a frame takes 10 bit periods.
module tb_laser_uart_tx;
  localparam int unsigned CPB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, ready, txd, done, active;
  logic [7:0] data;
  int checks = 0, failures = 0;

  laser_uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Monitor: decode each frame from the line.
  logic [7:0] sent_q[$];
  initial begin
    logic [7:0] exp, got;
    time t0;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      t0 = $time;
      exp = sent_q.pop_front();
      got = '0;
      // sample in the middle of each bit, verify level is constant over the bit
      for (int b = 0; b < 10; b++) begin
        logic lvl;
        @(posedge clk);  // first cycle of bit b seen at this edge
        lvl = txd;
        for (int c = 1; c < CPB; c++) begin
          @(posedge clk);
          if (txd !== lvl) begin
            failures++;
            $display("FAIL: line changed inside bit %0d", b);
          end
        end
        if (b == 0) check(lvl == 1'b0, "start bit 0");
        else if (b == 9) check(lvl == 1'b1, "stop bit 1");
        else got[b-1] = lvl;
      end
      check(got == exp, $sformatf("byte %02x expected %02x", got, exp));
    end
  end

  // Frame length in cycles: from the accepting edge to the edge where done is seen.
  int cyc = 0, nframes = 0;
  int acc_q[$];
  always @(posedge clk) begin
    cyc++;
    if (done && rst_n) begin
      nframes++;
      if (acc_q.size() > 0) begin
        int t_start;
        t_start = acc_q.pop_front();
        // accepted at one edge, done seen 10 bit periods plus one cycle later
        check(cyc - t_start == 10 * CPB + 1, $sformatf("frame length %0d cycles", cyc - t_start));
      end
    end
    if (valid && ready) acc_q.push_back(cyc);
  end

  initial begin
    valid = 0; data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    check(txd == 1'b1, "idle line is 1");
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      data  = 8'($urandom);
      if (i == 0) data = 8'h00;
      if (i == 1) data = 8'hFF;
      if (i == 2) data = 8'h55;
      valid = 1'b1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent_q.push_back(data);
      @(negedge clk);
      valid = 1'b0;
      if (i % 3 == 0) repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    repeat (12 * CPB) @(posedge clk);
    check(nframes == 60, $sformatf("60 frames completed (%0d)", nframes));
    check(txd == 1'b1, "line idles at 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
