// tb_square_wave_det: self-checking test of the handshake square-wave detector.
//
// Drives an 8-bit-period square wave (bit = 8 clocks, random phase, +/-1 cycle
// jitter) and checks that exactly one detect pulse follows, at the expected
// point (after the 6th good half period). Then checks that it stays silent for
// a wave at half the bit rate, for a wave too short to count, for UART-like
// random data and while disabled.
module tb_square_wave_det;
  localparam int unsigned CPB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, rxd = 1'b1, detect;
  int checks = 0, failures = 0, n_det = 0;

  square_wave_det #(.CLKS_PER_BIT(CPB), .TOL(2), .MIN_RUNS(6)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (detect) n_det++;

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

  // nbits alternating levels starting at 0, each half period bit_ns +/- jitter
  task automatic wave(input int nbits, input int bit_ns, input int jitter);
    for (int k = 0; k < nbits; k++) begin
      rxd = (k % 2 == 1);
      #(bit_ns + (jitter ? $urandom_range(0, 2 * jitter) - jitter : 0));
    end
    rxd = 1'b1;
  endtask

  initial begin
    #17 rst_n = 1'b1;
    en = 1'b1;
    #500;
    // valid handshake waves
    for (int i = 0; i < 10; i++) begin
      int n0;
      n0 = n_det;
      wave(8, CPB * 10, i % 2 ? 10 : 0);
      #($urandom_range(300, 900));
      check(n_det == n0 + 1, $sformatf("wave %0d detected once", i));
    end
    // detect timing: pulse after edge 7 of the wave (6 good runs)
    begin
      int t_edge, t_det;
      t_edge = $time;
      fork
        wave(8, CPB * 10, 0);
        begin
          @(posedge detect) t_det = $time;
        end
      join
      check(t_det - t_edge >= 6 * CPB * 10 && t_det - t_edge <= 6 * CPB * 10 + 40,
            $sformatf("detect %0d ns after first edge", t_det - t_edge));
    end
    #500;
    begin
      int n0;
      n0 = n_det;
      wave(8, CPB * 20, 0);            // half the bit rate
      #500;
      wave(5, CPB * 10, 0);            // too short
      #500;
      for (int i = 0; i < 200; i++) begin   // random levels, each at least 2 bits long
        rxd = 1'($urandom); #(CPB * 10 * $urandom_range(2, 3));
      end
      rxd = 1'b1; #500;
      en = 1'b0;
      wave(8, CPB * 10, 0);            // disabled
      #500;
      check(n_det == n0, "no false detection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
