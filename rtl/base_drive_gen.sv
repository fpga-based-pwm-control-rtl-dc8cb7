// base_drive_gen: half-cycle pulse selector and base drives 0 and 3 (the
// upper and lower switch of the first inverter leg).
//
// A pulse counter advances once per PWM pulse and wraps after 2 x 9 pulses.
// OP-1 is high for the first nine pulses of a supply cycle and low for the
// next nine.  Base drive 0 is OP-1 AND the PWM wave, base drive 3 is
// NOT OP-1 AND the PWM wave, so device 0 is chopped through the positive half
// cycle and device 3 through the negative one.  Because OP-1 only changes at
// the edge that starts a pulse, and the two drives are gated by the same
// wave, they are never on together.
//
// The 9/9 split of OP-1 and the two AND gates with the inverter follow the
// source.  Counting on pulse_adv (the clock edge where the wave rises) in
// place of clocking by the wave itself is this design's choice, as is the
// reset value, which makes the first pulse after reset pulse 0.
//
// Interface: pulse_adv and wave come from pwm_wave_gen; op1 is registered
// and valid for the whole pulse it belongs to; pulse_idx is 0..17.
module base_drive_gen #(
  parameter int unsigned PULSES_PER_HALF = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_adv,                  // a pulse starts at the next edge
  input  logic wave,                       // PWM wave (T flip-flop Q-bar)
  output logic op1,                        // 1 during the first half cycle
  output logic [$clog2(2*PULSES_PER_HALF)-1:0] pulse_idx,
  output logic bd0,                        // base drive 0 (leg R upper)
  output logic bd3                         // base drive 3 (leg R lower)
);

  localparam int unsigned IDX_W = $clog2(2*PULSES_PER_HALF);
  localparam logic [IDX_W-1:0] LAST = IDX_W'(2*PULSES_PER_HALF - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pulse_idx <= LAST;
    else if (pulse_adv) pulse_idx <= (pulse_idx == LAST) ? '0 : pulse_idx + 1'b1;
  end

  assign op1 = (pulse_idx < IDX_W'(PULSES_PER_HALF));
  assign bd0 =  op1 & wave;
  assign bd3 = ~op1 & wave;

endmodule
