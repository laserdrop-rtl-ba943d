// tb_ft_fast_serial: self-checking test of the FT232H Fast Serial port.
//
// Connects the port to a behavioural FT232H. Random bytes flow both ways at
// once; the FPGA side consumes received bytes with random delays, which
// stops FSCLK while its receive register is full, and FSCTS is dropped for a
// while to stall transmission. Checks: every byte arrives intact and in order
// in each direction, channel bits are 0, FSCLK runs at clk/FSCLK_DIV (10 MHz
// from 50 MHz), a byte in each direction takes 10 FSCLK periods when nothing
// stalls, and no frame starts while FSCTS is low.
module tb_ft_fast_serial;
  localparam int unsigned DIV = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       tx_valid = 1'b0, tx_ready, rx_valid, rx_ready = 1'b0;
  logic [7:0] tx_data = '0, rx_data;
  logic       fsclk, fsdi, fsdo, fscts;
  int checks = 0, failures = 0;
  logic [7:0] to_host_exp[$], from_host_exp[$];

  ft_fast_serial #(.FSCLK_DIV(DIV)) dut (.*);
  ft232h_model u_ft (.fsclk, .fsdi, .fsdo, .fscts);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (400000) @(posedge clk);
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

  // FSCLK period
  realtime t_last_rise = 0;
  int n_rise = 0, n_bad_period = 0;
  always @(posedge fsclk) begin
    if (n_rise > 0 && ($realtime - t_last_rise) < 100.0 - 0.01) n_bad_period++;
    t_last_rise = $realtime;
    n_rise++;
  end

  // frames must not start while FSCTS is low
  logic fsdi_prev = 1'b1;
  int in_frame_bits = 0, n_start_no_cts = 0;
  always @(posedge fsclk) begin
    if (in_frame_bits == 0 && fsdi == 1'b0) begin
      in_frame_bits = 10;
      if (!cts_seen) n_start_no_cts++;
    end
    if (in_frame_bits > 0) in_frame_bits--;
  end
  bit cts_seen;
  always @(negedge fsclk) cts_seen = fscts;

  // consumer of bytes from the host
  int n_from_host = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (rx_valid && rx_ready) begin
        logic [7:0] e;
        e = from_host_exp.pop_front();
        check(rx_data == e, $sformatf("from host %02x expected %02x", rx_data, e));
        n_from_host++;
      end
      rx_ready <= ($urandom_range(0, 3) != 0);
    end
  end

  initial begin
    #35 rst_n = 1'b1;
    // timing of one undisturbed byte each way
    begin
      int t0, t1;
      u_ft.h2f_q.push_back(8'h3C); from_host_exp.push_back(8'h3C);
      @(posedge clk);
      t0 = $time;
      wait (n_from_host == 1);
      t1 = $time;
      // 10 FSCLK periods (1 us) plus start-up and consumer delay
      check(t1 - t0 >= 1000 && t1 - t0 <= 1400, $sformatf("byte from host in %0d ns", t1 - t0));
    end
    // bidirectional random traffic
    fork
      for (int i = 0; i < 200; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        @(negedge clk);
        tx_valid = 1'b1; tx_data = b;
        @(posedge clk);
        while (!tx_ready) @(posedge clk);
        to_host_exp.push_back(b);
        @(negedge clk);
        tx_valid = 1'b0;
      end
      for (int i = 0; i < 200; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        from_host_exp.push_back(b);
        u_ft.h2f_q.push_back(b);
      end
      begin
        #20000;
        u_ft.cts_en = 1'b0;
        #15000;
        u_ft.cts_en = 1'b1;
      end
    join
    wait (n_from_host == 201 && u_ft.n_f2h == 200);
    #2000;
    check(u_ft.f2h_q.size() == 200, "200 bytes reached the host");
    for (int i = 0; i < 200; i++)
      check(u_ft.f2h_q[i] == to_host_exp[i], $sformatf("to host byte %0d", i));
    check(u_ft.bad_frames == 0, "channel bits are 0");
    check(n_bad_period == 0, "FSCLK period is 100 ns");
    check(n_start_no_cts == 0, "no frame started without FSCTS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
