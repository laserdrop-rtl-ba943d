// tb_packet_buffer: self-checking test of the 512-bit packet register.
//
// Fills the register with random pairs in random order, then reads every pair
// and every byte back and checks them and the tag byte against a reference
// array. Overwrites a few pairs and checks that only those change.
module tb_packet_buffer;
  import ld_pkg::*;
  localparam int unsigned BYTES = 64;
  logic clk = 1'b0;
  logic       wr_en;
  logic [4:0] wr_idx, rd_pair_idx;
  byte_pair_t wr_pair, rd_pair;
  logic [5:0] rd_byte_idx;
  logic [7:0] rd_byte, tag;
  logic [7:0] ref_mem [BYTES];
  int checks = 0, failures = 0;

  packet_buffer #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic write_pair(input int idx);
    byte_pair_t p;
    p = byte_pair_t'($urandom);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = 5'(idx); wr_pair = p;
    ref_mem[2*idx] = p.b0; ref_mem[2*idx+1] = p.b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic check_all();
    for (int i = 0; i < BYTES / 2; i++) begin
      rd_pair_idx = 5'(i);
      #1;
      check(rd_pair.b0 == ref_mem[2*i] && rd_pair.b1 == ref_mem[2*i+1],
            $sformatf("pair %0d", i));
    end
    for (int i = 0; i < BYTES; i++) begin
      rd_byte_idx = 6'(i);
      #1;
      check(rd_byte == ref_mem[i], $sformatf("byte %0d", i));
    end
    check(tag == ref_mem[1], "tag is byte 1");
  endtask

  initial begin
    int order[32];
    wr_en = 0; wr_idx = 0; wr_pair = '0; rd_pair_idx = 0; rd_byte_idx = 0;
    for (int i = 0; i < 32; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) write_pair(order[i]);
    check_all();
    for (int k = 0; k < 5; k++) write_pair($urandom_range(0, 31));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
