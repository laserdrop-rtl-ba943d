// tb_laser_mod: self-checking test of the three-level laser drive.
//
// Applies every combination of enable and data bit in random order and checks,
// one cycle later, the two switch gates and the reported optical state against
// the table: off = no switch, logic 0 = low switch only, logic 1 = both.
module tb_laser_mod;
  import ld_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, bit_i, gate_lo, gate_hi;
  laser_state_t state;
  int checks = 0, failures = 0;

  laser_mod dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    en = 1'b1; bit_i = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(!gate_lo && !gate_hi && state == LAS_OFF, "off in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic e, b;
      e = 1'($urandom); b = 1'($urandom);
      @(negedge clk);
      en = e; bit_i = b;
      @(posedge clk);
      #1;
      if (!e)     check(!gate_lo && !gate_hi && state == LAS_OFF,  "off");
      else if (b) check( gate_lo &&  gate_hi && state == LAS_HIGH, "high for 1");
      else        check( gate_lo && !gate_hi && state == LAS_LOW,  "low for 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
