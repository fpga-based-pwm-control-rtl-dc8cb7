// phase_shift_drive: base drives of a further inverter leg, phase shifted by
// a whole number of pulses.
//
// OP-1 is shifted into a DEPTH-bit shift register once per PWM pulse.  The
// last stage is OP-1 delayed by DEPTH pulses; with 3 pulses per 60 degrees a
// 3-bit register gives 60 degrees and a 6-bit register 120 degrees.  The
// delayed signal ANDed with the PWM wave drives the device that conducts in
// that window (bd_hi), and its inverse ANDed with the wave drives the
// complementary device (bd_lo).  With DEPTH = 3 these are base drives 1 and
// 4, with DEPTH = 6 base drives 2 and 5.
//
// The 3-bit and 6-bit shift registers and the gating follow the source.
// Shifting on pulse_adv and clearing the register at reset are this design's
// choices; after reset the leg needs DEPTH pulses to reach its steady
// pattern, during which bd_lo is the one chopping.
//
// Interface: op1 must be the value before the pulse_adv edge (as from
// base_drive_gen), so the register holds OP-1 of the previous DEPTH pulses.
module phase_shift_drive #(
  parameter int unsigned DEPTH = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_adv,   // shift at the next edge
  input  logic op1,         // half-cycle select from base_drive_gen
  input  logic wave,        // PWM wave
  output logic shifted,     // OP-1 delayed by DEPTH pulses
  output logic bd_hi,       // shifted AND wave
  output logic bd_lo        // NOT shifted AND wave
);

  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sr <= '0;
    else if (pulse_adv) sr <= (sr << 1) | DEPTH'(op1);
  end

  assign shifted = sr[DEPTH-1];
  assign bd_hi   =  shifted & wave;
  assign bd_lo   = ~shifted & wave;

endmodule
