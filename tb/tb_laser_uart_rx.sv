// tb_laser_uart_rx: self-checking test of the oversampling laser UART receiver.
//
// A behavioural line driver builds frames sample by sample: each bit is
// OVERSAMPLE clock periods long and starts at a random phase relative to the
// receiver clock. The test covers clean frames back to back, frames with one
// or two samples of every bit flipped (the majority vote must still recover
// the byte), a short low glitch on an idle line (must be ignored), a frame
// whose stop bit is 0 (must give frame_err and no byte), a lost beam (line
// held at 0), and a 2% faster transmitter. Each accepted byte is compared with
// what was sent, and the delay from the start edge to `valid` is checked.
module tb_laser_uart_rx;
  localparam int unsigned OS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rxd = 1'b1;
  logic valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_valid = 0, n_ferr = 0;
  logic [7:0] exp_q[$];
  int cyc = 0;
  int edge_q[$];

  laser_uart_rx #(.OVERSAMPLE(OS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  always @(posedge clk) begin
    if (rst_n && valid) begin
      n_valid++;
      if (exp_q.size() == 0) check(0, "unexpected byte");
      else begin
        logic [7:0] e;
        int ec;
        e = exp_q.pop_front();
        ec = edge_q.pop_front();
        check(data == e, $sformatf("got %02x expected %02x", data, e));
        // start edge to valid: 9 bits + stop window (OS-2) + 2 sync + 1 reg
        check(cyc - ec >= 9 * OS + OS - 2 && cyc - ec <= 9 * OS + OS + 3,
              $sformatf("latency %0d cycles", cyc - ec));
      end
    end
    if (rst_n && frame_err) n_ferr++;
  end

  // Drive one frame; bit_ns is the bit period; flips = samples flipped per bit.
  task automatic send(input logic [7:0] b, input int bit_ns, input int flips,
                      input bit bad_stop);
    logic [9:0] fr;
    fr = {~bad_stop, b, 1'b0};
    if (!bad_stop) edge_q.push_back(cyc);
    for (int k = 0; k < 10; k++) begin
      int fpos[2];
      fpos[0] = $urandom_range(1, 3);
      fpos[1] = $urandom_range(5, 6);
      for (int s = 0; s < OS; s++) begin
        logic v;
        v = fr[k];
        if (k != 0 && k != 9 && flips > 0 && s == fpos[0]) v = ~v;
        if (k != 0 && k != 9 && flips > 1 && s == fpos[1]) v = ~v;
        rxd = v;
        #(bit_ns * 1.0 / OS);
      end
    end
    rxd = 1'b1;
  endtask

  initial begin
    #23;
    rst_n = 1'b1;
    #200;
    // clean frames, back to back, random phase
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp_q.push_back(b);
      send(b, OS * 10, 0, 0);
      if (i % 5 == 0) #($urandom_range(1, 97));
    end
    #300;
    check(n_valid == 40, "40 clean bytes");
    // one and two flipped samples per data bit
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp_q.push_back(b);
      send(b, OS * 10, (i % 2) + 1, 0);
      #($urandom_range(0, 40));
    end
    #300;
    check(n_valid == 70, "bytes with flipped samples recovered");
    // a 2-sample glitch on the idle line is not a start bit
    rxd = 1'b0; #20; rxd = 1'b1; #400;
    check(n_valid == 70 && n_ferr == 0, "glitch ignored");
    // stop bit 0 gives a framing error and no byte
    send(8'hA5, OS * 10, 0, 1);
    #300;
    check(n_ferr == 1 && n_valid == 70, "framing error on bad stop bit");
    // lost beam: line stays at 0
    rxd = 1'b0; #(OS * 10 * 30); rxd = 1'b1; #500;
    check(n_ferr == 2 && n_valid == 70, "lost beam reported once");
    // receiver recovers afterwards, transmitter 2 % fast
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp_q.push_back(b);
      send(b, OS * 10 - 2, 0, 0);   // 78 ns bits instead of 80
    end
    #300;
    check(n_valid == 90, "bytes after recovery at fast rate");
    check(exp_q.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
