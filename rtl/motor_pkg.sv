// motor_pkg: constants, types and the OFF-count formula shared by the
// three-phase PWM motor controller.
//
// The PWM pattern has 3 pulses per 60 degree sector and 9 pulses per half
// cycle of the motor supply, so 18 pulses per cycle.  Both pulse counters are
// 16 bits wide.  The selectable supply frequency runs from 10 Hz to 50 Hz in
// 1 Hz steps, one OFF-count word per step.  These numbers follow the source
// description; the key codes and the system clock are this design's choices.
package motor_pkg;

  localparam int unsigned CNT_W             = 16;  // counter-1 / counter-2 width
  localparam int unsigned PULSES_PER_SECTOR = 3;   // pulses per 60 degrees
  localparam int unsigned SECTORS_PER_HALF  = 3;   // 60 degree sectors per half cycle
  localparam int unsigned PULSES_PER_HALF   = PULSES_PER_SECTOR * SECTORS_PER_HALF;  // 9
  localparam int unsigned PULSES_PER_CYCLE  = 2 * PULSES_PER_HALF;                   // 18
  localparam int unsigned F_MIN_HZ          = 10;  // lowest selectable frequency
  localparam int unsigned F_MAX_HZ          = 50;  // highest selectable frequency
  localparam int unsigned FREQ_STEPS        = F_MAX_HZ - F_MIN_HZ + 1;  // 41 table words
  localparam int unsigned FREQ_W            = 7;   // binary frequency, 0..99 Hz
  localparam int unsigned LOC_W             = 6;   // OFF-count memory address

  // Function of a key after the 4x4 matrix position has been decoded.
  typedef enum logic [3:0] {
    KEY_0 = 4'd0, KEY_1 = 4'd1, KEY_2 = 4'd2, KEY_3 = 4'd3, KEY_4 = 4'd4,
    KEY_5 = 4'd5, KEY_6 = 4'd6, KEY_7 = 4'd7, KEY_8 = 4'd8, KEY_9 = 4'd9,
    KEY_FWD   = 4'd10,
    KEY_REV   = 4'd11,
    KEY_START = 4'd12,
    KEY_STOP  = 4'd13,
    KEY_CLEAR = 4'd14,
    KEY_ENTER = 4'd15
  } key_t;

  // Drive state of the start/stop/forward/reverse controller.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // bridge off
    ST_RUN  = 2'd1,   // running, frequency follows the keypad setting
    ST_STOP = 2'd2    // soft stop: ramping down to the 10 Hz location
  } drive_state_t;

  // Counter-2 load value for supply frequency f_hz.  A pulse period is
  // (on_count + 1) + (off + 1) clocks and there are PULSES_PER_CYCLE pulses
  // per supply cycle:  off = round(clk_hz / (18 * f_hz)) - on_count - 2.
  function automatic logic [CNT_W-1:0] off_count(input int unsigned clk_hz,
                                                 input int unsigned on_count,
                                                 input int unsigned f_hz);
    longint unsigned div, period;
    div    = longint'(PULSES_PER_CYCLE) * f_hz;
    period = (longint'(clk_hz) + div / 2) / div;
    return CNT_W'(period - longint'(on_count) - 2);
  endfunction

endpackage
