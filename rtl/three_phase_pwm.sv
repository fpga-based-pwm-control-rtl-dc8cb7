// three_phase_pwm: six inverter base drive signals for 180 degree conduction
// with multiple-pulse PWM.
//
// pwm_wave_gen makes the pulse train (fixed ON, table-driven OFF).
// base_drive_gen splits it into the positive half cycle (device 0) and the
// negative one (device 3).  Two phase_shift_drive instances delay the
// half-cycle signal by 3 and 6 pulses (60 and 120 degrees) and give devices
// 1/4 and 2/5.  Devices then start conducting in the order 0-1-2-3-4-5, 60
// degrees apart, and each leg's pair is chopped by the same pulses:
//   leg R: upper 0, lower 3   leg Y: upper 2, lower 5   leg B: upper 4, lower 1
// Reverse rotation (dir = 1) swaps the Y and B legs, giving the order
// 0-5-4-3-2-1.  en = 0 forces all six drives off.
//
// Device numbering, the 0-1-2-3-4-5 order, the 3 and 6 bit shift registers
// and the pulse counts follow the source.  The reversal by swapping two legs,
// the enable and the output register (which makes the six drives glitch-free,
// one clock after the internal signals) are this design's choices.  The
// OFF time between pulses is a dead band on every leg: both devices of a leg
// are off there, and the half-cycle select only changes at a pulse start.
module three_phase_pwm #(
  parameter int unsigned CNT_W             = 16,
  parameter int unsigned PULSES_PER_SECTOR = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] on_count,    // counter-1 load (ON = on_count + 1 clocks)
  input  logic [CNT_W-1:0] off_count,   // counter-2 load (OFF = off_count + 1 clocks)
  input  logic             en,          // 1: drive the bridge
  input  logic             dir,         // 0: forward, 1: reverse
  output logic [5:0]       base_drive,  // registered drives, bit i = device i
  output logic             wave,        // PWM wave
  output logic             pulse_adv    // a pulse starts at the next edge
);

  localparam int unsigned PULSES_PER_HALF = 3 * PULSES_PER_SECTOR;

  logic       op1;
  logic       bd0, bd3, bd1, bd4, bd2, bd5;
  logic [5:0] fwd, mapped;

  pwm_wave_gen #(.CNT_W(CNT_W)) u_wave (
    .clk, .rst_n, .data1(on_count), .data2(off_count),
    .q(), .q_n(wave), .pulse_adv
  );

  base_drive_gen #(.PULSES_PER_HALF(PULSES_PER_HALF)) u_bd03 (
    .clk, .rst_n, .pulse_adv, .wave, .op1, .pulse_idx(), .bd0, .bd3
  );

  phase_shift_drive #(.DEPTH(PULSES_PER_SECTOR)) u_bd14 (
    .clk, .rst_n, .pulse_adv, .op1, .wave, .shifted(), .bd_hi(bd1), .bd_lo(bd4)
  );

  phase_shift_drive #(.DEPTH(2*PULSES_PER_SECTOR)) u_bd25 (
    .clk, .rst_n, .pulse_adv, .op1, .wave, .shifted(), .bd_hi(bd2), .bd_lo(bd5)
  );

  assign fwd = {bd5, bd4, bd3, bd2, bd1, bd0};

  always_comb begin
    mapped = fwd;
    if (dir) begin           // swap legs Y (2/5) and B (4/1)
      mapped[2] = fwd[4];
      mapped[4] = fwd[2];
      mapped[5] = fwd[1];
      mapped[1] = fwd[5];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) base_drive <= '0;
    else        base_drive <= en ? mapped : '0;
  end

  // Both devices of one leg must never be driven together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    !(base_drive[0] && base_drive[3]) && !(base_drive[2] && base_drive[5]) &&
    !(base_drive[4] && base_drive[1]));

endmodule
