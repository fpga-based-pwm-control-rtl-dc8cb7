// tb_start_stop_logic: drives the start/stop/forward/reverse controller with
// PWM pulse strobes and the comparator flags (formed here from the keypad
// location) and checks soft start from the 10 Hz location, one location
// step per pulse up and down, holding at the keypad location, soft stop to
// 10 Hz and then off, and reversal as stop - direction change - start.  A
// second instance with RAMP_TICKS = 3 must take three pulses per step.
module tb_start_stop_logic;
  import motor_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       pulse_adv = 1'b0, start = 1'b0, stop = 1'b0, fwd = 1'b0, rev = 1'b0;
  logic [5:0] key_loc = '0;
  logic [5:0] loc, loc3;
  logic       gth1, lth1, et1, gth2, et2, running, dir;
  logic       g31, l31, e31, g32, e32, running3, dir3;
  drive_state_t state, state3;
  int         checks = 0, failures = 0;

  assign gth1 = key_loc > loc;
  assign lth1 = key_loc < loc;
  assign et1  = key_loc == loc;
  assign gth2 = loc > 6'd0;
  assign et2  = loc == 6'd0;
  assign g31  = key_loc > loc3;
  assign l31  = key_loc < loc3;
  assign e31  = key_loc == loc3;
  assign g32  = loc3 > 6'd0;
  assign e32  = loc3 == 6'd0;

  start_stop_logic dut (.clk, .rst_n, .pulse_adv, .start, .stop, .fwd, .rev,
                        .gth1, .lth1, .et1, .gth2, .et2, .loc, .running, .dir, .state);
  start_stop_logic #(.RAMP_TICKS(3)) dut3 (.clk, .rst_n, .pulse_adv, .start, .stop, .fwd, .rev,
                        .gth1(g31), .lth1(l31), .et1(e31), .gth2(g32), .et2(e32),
                        .loc(loc3), .running(running3), .dir(dir3), .state(state3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t (loc %0d)", what, $time, loc);
    end
  endtask

  task automatic pulse();
    repeat (3) @(posedge clk);
    #1 pulse_adv = 1'b1;
    @(posedge clk);
    #1 pulse_adv = 1'b0;
  endtask

  task automatic strobe(ref logic s);
    #1 s = 1'b1;
    @(posedge clk);
    #1 s = 1'b0;
  endtask

  // location may only move by one per clock.  The RAMP_TICKS divider runs
  // freely, so with the one idle pulse before start, pulse p of the ramp is
  // pulse p + 1 overall.
  logic [5:0] loc_d = '0;
  logic       rst_d = 1'b0;
  always @(posedge clk) begin
    rst_d <= rst_n;
    if (rst_d && loc != loc_d && loc != loc_d + 6'd1 && loc != loc_d - 6'd1) begin
      failures++;
      $display("FAIL: location jumped %0d -> %0d", loc_d, loc);
    end
    loc_d <= loc;
  end

  initial begin
    int n;
    @(posedge clk);
    #1 rst_n = 1'b1;
    check(state == ST_IDLE && !running && loc == 0 && !dir, "reset state");
    key_loc = 6'd40;                      // 50 Hz
    pulse();
    check(loc == 0 && !running, "idle ignores pulses");
    strobe(start);
    check(running && state == ST_RUN && loc == 0, "start at the 10 Hz location");
    // soft start: one step per pulse
    for (int p = 1; p <= 40; p++) begin
      pulse();
      check(int'(loc) == p, $sformatf("ramp up step %0d", p));
      check(int'(loc3) == (p + 1) / 3, $sformatf("ramp up with 3 pulses per step %0d", p));
    end
    pulse();
    check(loc == 40, "holds at the keypad location");
    // lower the setting: ramps down, then holds
    key_loc = 6'd20;
    n = 0;
    while (loc != 20 && n < 100) begin pulse(); n++; end
    check(n == 20, $sformatf("ramp down took %0d pulses", n));
    pulse();
    check(loc == 20 && running, "holds at the new location");
    // same direction key changes nothing
    strobe(fwd);
    check(state == ST_RUN && !dir, "forward while forward");
    // reversal: stop to 10 Hz, flip, soft start again
    strobe(rev);
    check(state == ST_STOP && !dir && running, "reversal starts with a soft stop");
    n = 0;
    while (loc != 0 && n < 100) begin
      pulse(); n++;
      check(!dir && running, "direction kept during the stop");
    end
    check(n == 20, $sformatf("soft stop took %0d pulses", n));
    pulse();
    check(dir && state == ST_RUN && loc == 0 && running, "direction flips at 10 Hz");
    n = 0;
    while (loc != 20 && n < 100) begin pulse(); n++; end
    check(n == 20 && dir, $sformatf("restart in reverse took %0d pulses", n));
    // stop: soft stop, then off
    strobe(stop);
    check(state == ST_STOP && running, "stop ramps first");
    n = 0;
    while (loc != 0 && n < 100) begin pulse(); n++; end
    check(n == 20, "stop ramp length");
    check(running, "still driving at 10 Hz");
    pulse();
    check(!running && state == ST_IDLE && dir, "off after the ramp, direction kept");
    // direction keys while idle
    strobe(fwd);
    check(!dir && !running, "forward selected while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
