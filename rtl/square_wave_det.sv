// square_wave_det: detects the handshake square wave on one laser line.
//
// The handshake of the LaserDrop protocol is a square wave of eight bit
// periods, each half period one bit long. This detector measures the time
// between successive edges of the synchronised line. A run whose length is
// within CLKS_PER_BIT +/- TOL cycles counts as a good half period; any other
// run resets the count. After MIN_RUNS good half periods in a row, `detect`
// pulses for one cycle and the count starts again. An eight-bit wave has seven
// complete half periods between its eight edges; MIN_RUNS defaults to 6 to
// leave one for a missed edge. The run-length method and the tolerance are
// this design's choices; the protocol only says a square wave is exchanged.
//
// Interface: rxd is asynchronous, en clears the detector while low.
// Timing: detect comes 2 cycles (synchroniser) after the edge that ends the
// MIN_RUNS-th good half period.
module square_wave_det #(
  parameter int unsigned CLKS_PER_BIT = 8,
  parameter int unsigned TOL          = 2,
  parameter int unsigned MIN_RUNS     = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic rxd,
  output logic detect
);
  localparam int unsigned LW = $clog2(CLKS_PER_BIT + TOL + 2);
  localparam int unsigned RW = $clog2(MIN_RUNS + 1);
  localparam int unsigned RUN_MAX = CLKS_PER_BIT + TOL + 1;

  logic          sync1, sync2, prev;
  logic [LW-1:0] run_len;    // cycles since the last edge, saturating
  logic          seen_edge;  // run_len is measured from a real edge
  logic [RW-1:0] good_runs;
  logic          edge_now, run_ok;

  assign edge_now = (sync2 != prev);
  assign run_ok   = seen_edge &&
                    (run_len >= LW'(CLKS_PER_BIT - TOL)) &&
                    (run_len <= LW'(CLKS_PER_BIT + TOL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1     <= 1'b0;
      sync2     <= 1'b0;
      prev      <= 1'b0;
      run_len   <= '0;
      seen_edge <= 1'b0;
      good_runs <= '0;
      detect    <= 1'b0;
    end else begin
      sync1  <= rxd;
      sync2  <= sync1;
      prev   <= sync2;
      detect <= 1'b0;
      if (!en) begin
        run_len   <= '0;
        seen_edge <= 1'b0;
        good_runs <= '0;
      end else if (edge_now) begin
        run_len   <= LW'(1);
        seen_edge <= 1'b1;
        if (!run_ok) begin
          good_runs <= '0;
        end else if (good_runs == RW'(MIN_RUNS - 1)) begin
          good_runs <= '0;
          detect    <= 1'b1;
        end else begin
          good_runs <= good_runs + RW'(1);
        end
      end else if (run_len != LW'(RUN_MAX)) begin
        run_len <= run_len + LW'(1);
      end
    end
  end
endmodule
