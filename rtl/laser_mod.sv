// laser_mod: three-level drive of one laser diode.
//
// Each laser is switched by two low-side NMOS transistors, each in series with
// its own resistor. Closing only the "low" switch runs the diode at low power
// (about 0.5 mW, logic 0); closing both puts the two resistors in parallel and
// runs it at high power (about 2.5 mW, logic 1); opening both turns it off.
// Logic 0 is kept at non-zero power so the laser never has to start from dark
// between bits, which shortens its switching time, and "off" stays distinct
// from a string of zeros. This mapping follows the LaserDrop transmitter
// circuit; registering the gate outputs is this design's choice, so that the
// gate drivers never see combinational glitches.
//
// Interface: en = laser on, bit_i = data level. gate_lo / gate_hi go to the
// gate drivers of the two switches, state reports the optical level.
// Timing: one register stage, outputs follow the inputs one cycle later.
module laser_mod
  import ld_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         bit_i,
  output logic         gate_lo,
  output logic         gate_hi,
  output laser_state_t state
);
  laser_state_t next_state;

  always_comb begin
    if (!en)        next_state = LAS_OFF;
    else if (bit_i) next_state = LAS_HIGH;
    else            next_state = LAS_LOW;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LAS_OFF;
      gate_lo <= 1'b0;
      gate_hi <= 1'b0;
    end else begin
      state   <= next_state;
      gate_lo <= (next_state != LAS_OFF);
      gate_hi <= (next_state == LAS_HIGH);
    end
  end
endmodule
