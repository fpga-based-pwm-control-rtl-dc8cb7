// motor_ctrl_top: complete FPGA control circuit of a variable voltage,
// variable frequency (V/f) three-phase induction motor drive.
//
// The user sets a supply frequency of 10..50 Hz and the direction on a 4x4
// keypad and starts or stops the motor.  The six base drive outputs go to
// the isolated gate driver cards of a six-MOSFET voltage source inverter.
// Each inverter device conducts for 180 degrees, chopped into 9 equal pulses
// per half cycle.  The ON time of a pulse is fixed (ON_COUNT + 1 clocks) and
// the OFF time comes from a table indexed by frequency.  Lowering the
// frequency lengthens the OFF time, which lowers the duty and so the voltage
// in proportion.
//
// Data path:
//   keypad_scanner -> key_entry -> freq_decoder ---------> start comparator
//   start_stop_logic (current location) -> start/stop comparators (feedback)
//   current location -> off_time_mem -> three_phase_pwm -> base_drive[5:0]
//   current location -> frequency -> seg7_display
// start_stop_logic moves the current location one step per PWM pulse toward
// the keypad location (soft start and speed change), ramps it down to the
// 10 Hz location before stopping (soft stop), and on a direction change
// stops, swaps the phase order and starts again.
//
// Clocking: one clock, CLK_HZ (assumed 1 MHz; the pulse counters are 16
// bits, so this clock must be slow enough for the 10 Hz OFF count to fit).
// The table can be rewritten at run time through mem_we/mem_waddr/mem_wdata.
// Reset is asynchronous and active low.
module motor_ctrl_top #(
  parameter int unsigned CLK_HZ       = 1_000_000,
  parameter int unsigned ON_COUNT     = 999,
  parameter int unsigned RAMP_TICKS   = 1,
  parameter int unsigned SCAN_DIV     = 1000,
  parameter int unsigned DEBOUNCE     = 4,
  parameter int unsigned DIGIT_CYCLES = 1000,
  parameter int unsigned POLES        = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // keypad matrix
  input  logic [3:0]                  kp_col_n,
  output logic [3:0]                  kp_row_n,
  // to the driver cards: bit i drives inverter device i
  output logic [5:0]                  base_drive,
  // 7-segment display
  output logic [6:0]                  seg,
  output logic [5:0]                  an,
  // OFF-count table write port
  input  logic                        mem_we,
  input  logic [motor_pkg::LOC_W-1:0] mem_waddr,
  input  logic [motor_pkg::CNT_W-1:0] mem_wdata,
  // status
  output logic                        running,
  output logic                        dir,
  output motor_pkg::drive_state_t     state,
  output logic                        pwm_wave,
  output logic [motor_pkg::FREQ_W-1:0] cur_freq
);
  import motor_pkg::*;

  localparam int unsigned LOC_10HZ = 0;

  logic              key_valid;
  logic [3:0]        key_pos;
  logic [FREQ_W-1:0] freq_set;
  logic              err, cmd_start, cmd_stop, cmd_fwd, cmd_rev;
  logic [LOC_W-1:0]  key_loc, cur_loc;
  logic              key_loc_valid;
  logic              gth1, lth1, et1, gth2, lth2, et2;
  logic [CNT_W-1:0]  off_cnt;
  logic              pulse_adv;

  keypad_scanner #(.SCAN_DIV(SCAN_DIV), .DEBOUNCE(DEBOUNCE)) u_scan (
    .clk, .rst_n, .col_n(kp_col_n), .row_n(kp_row_n), .key_valid, .key_pos
  );

  key_entry u_keys (
    .clk, .rst_n, .key_valid, .key_pos, .freq_set, .err,
    .start(cmd_start), .stop(cmd_stop), .fwd(cmd_fwd), .rev(cmd_rev)
  );

  freq_decoder u_dec (.freq(freq_set), .loc(key_loc), .valid(key_loc_valid));

  loc_comparator #(.W(LOC_W)) u_start_cmp (
    .a(key_loc), .b(cur_loc), .gth(gth1), .lth(lth1), .et(et1)
  );

  loc_comparator #(.W(LOC_W)) u_stop_cmp (
    .a(cur_loc), .b(LOC_W'(LOC_10HZ)), .gth(gth2), .lth(lth2), .et(et2)
  );

  start_stop_logic #(.LOC_W(LOC_W), .LOC_10HZ(LOC_10HZ), .RAMP_TICKS(RAMP_TICKS)) u_ctrl (
    .clk, .rst_n, .pulse_adv,
    .start(cmd_start), .stop(cmd_stop), .fwd(cmd_fwd), .rev(cmd_rev),
    .gth1, .lth1, .et1, .gth2, .et2,
    .loc(cur_loc), .running, .dir, .state
  );

  off_time_mem #(.CLK_HZ(CLK_HZ), .ON_COUNT(ON_COUNT)) u_mem (
    .clk, .raddr(cur_loc), .rdata(off_cnt),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata)
  );

  three_phase_pwm u_pwm (
    .clk, .rst_n, .on_count(CNT_W'(ON_COUNT)), .off_count(off_cnt),
    .en(running), .dir, .base_drive, .wave(pwm_wave), .pulse_adv
  );

  assign cur_freq = running ? FREQ_W'(F_MIN_HZ + 32'(cur_loc)) : '0;

  seg7_display #(.POLES(POLES), .DIGIT_CYCLES(DIGIT_CYCLES)) u_disp (
    .clk, .rst_n, .freq(cur_freq), .err, .seg, .an
  );

  // key_entry only accepts in-range frequencies, so the decoder always maps.
  a_key_loc_valid: assert property (@(posedge clk) disable iff (!rst_n) key_loc_valid);
  // The stop comparator never sees a location below the 10 Hz one.
  a_no_below_10hz: assert property (@(posedge clk) disable iff (!rst_n) !lth2);

endmodule
