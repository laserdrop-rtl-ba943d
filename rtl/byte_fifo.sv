// byte_fifo: small synchronous FIFO used to queue bytes for the host.
//
// A circular buffer of DEPTH entries with separate read and write pointers
// that carry one extra wrap bit. Used on the way to the USB transceiver, where
// a whole received packet is queued at once while the serial port drains it
// one byte per frame. Interface: valid/ready on both sides; `count` gives the
// fill level. Timing: a written byte can be read on the next cycle; the
// output is taken straight from the array (first-word fall-through).
module byte_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;

  assign count     = wr_ptr - rd_ptr;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (in_valid && in_ready)   wr_ptr <= wr_ptr + (AW+1)'(1);
      if (out_valid && out_ready) rd_ptr <= rd_ptr + (AW+1)'(1);
    end
  end
endmodule
