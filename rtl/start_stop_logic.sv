// start_stop_logic: start/stop and forward/reverse controller.  It owns the
// current memory location (the "start counter"), which selects the OFF count
// and so the present supply frequency, and ramps it one location at a time.
//
// Steps are taken on PWM pulses: every RAMP_TICKS-th pulse_adv is a ramp
// step.  States:
//   IDLE  bridge off, location parked at LOC_10HZ.  START enters RUN; FWD or
//         REV only set the direction.
//   RUN   bridge on.  On each step the location moves one toward the keypad
//         location: up when GTH1 (keypad > current), down when LTH1, held
//         when ET1.  STOP enters STOP.  A direction key opposite to the present
//         direction also enters STOP, with a reversal pending.
//   STOP  bridge on.  On each step the location moves down while GTH2
//         (current > 10 Hz location).  At ET2 it either goes to IDLE or, with
//         a reversal pending, flips the direction and re-enters RUN, so the
//         motor soft-starts the other way from 10 Hz.  START (with no reversal
//         pending) returns to RUN.
//
// The comparator flags, the increment/decrement/hold rule, the soft stop to
// the 10 Hz location and the stop-then-start reversal follow the source, as
// does the step clock (the PWM wave).  The state encoding, the command
// priority (stop over direction over ramping), the reset values (IDLE,
// forward, LOC_10HZ) and the RAMP_TICKS divider (1 = a step on every pulse,
// as in the source) are this design's choices.
module start_stop_logic #(
  parameter int unsigned LOC_W      = motor_pkg::LOC_W,
  parameter int unsigned LOC_10HZ   = 0,
  parameter int unsigned RAMP_TICKS = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pulse_adv,  // one PWM pulse
  input  logic             start,      // command strobes, one clock each
  input  logic             stop,
  input  logic             fwd,
  input  logic             rev,
  input  logic             gth1,       // start comparator
  input  logic             lth1,
  input  logic             et1,
  input  logic             gth2,       // stop comparator
  input  logic             et2,
  output logic [LOC_W-1:0] loc,        // current memory location
  output logic             running,    // drive the bridge
  output logic             dir,        // 0: forward, 1: reverse
  output motor_pkg::drive_state_t state
);
  import motor_pkg::*;

  localparam int unsigned TW = (RAMP_TICKS > 1) ? $clog2(RAMP_TICKS) : 1;

  logic [TW-1:0] tcnt;
  logic          step, rev_pending, opposite;

  assign step     = pulse_adv && (tcnt == TW'(RAMP_TICKS - 1));
  assign opposite = (fwd && dir) || (rev && !dir);
  assign running  = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            tcnt <= '0;
    else if (pulse_adv)    tcnt <= (tcnt == TW'(RAMP_TICKS - 1)) ? '0 : tcnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      loc         <= LOC_W'(LOC_10HZ);
      dir         <= 1'b0;
      rev_pending <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          loc <= LOC_W'(LOC_10HZ);
          if (fwd) dir <= 1'b0;
          if (rev) dir <= 1'b1;
          if (start) state <= ST_RUN;
        end
        ST_RUN: begin
          if (stop) begin
            state       <= ST_STOP;
            rev_pending <= 1'b0;
          end else if (opposite) begin
            state       <= ST_STOP;
            rev_pending <= 1'b1;
          end else if (step) begin
            if (gth1)      loc <= loc + 1'b1;
            else if (lth1) loc <= loc - 1'b1;
          end
        end
        ST_STOP: begin
          if (stop)          rev_pending <= 1'b0;
          else if (opposite) rev_pending <= 1'b1;
          else if (start && !rev_pending) state <= ST_RUN;
          if (step && !stop && !opposite && !start) begin
            if (gth2) loc <= loc - 1'b1;
            else if (et2) begin
              if (rev_pending) begin
                dir         <= ~dir;
                rev_pending <= 1'b0;
                state       <= ST_RUN;
              end else begin
                state <= ST_IDLE;
              end
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Table 1: the start comparator reports exactly one relation.
  a_cmp1_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot({gth1, lth1, et1}));

endmodule
