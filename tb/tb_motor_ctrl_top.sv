// tb_motor_ctrl_top: end-to-end run of the whole controller at its default
// parameters (1 MHz clock, ON = 1000 clocks, 1 ms keypad slots), operated
// through a 4x4 key matrix model exactly as a user would:
//   "50#"  C        enter 50 Hz, start: soft start 10 -> 50 Hz, forward
//   "7#"            out-of-range entry: "Err" on the display, setting kept
//   "*30#"          clear, enter 30 Hz: ramp down 50 -> 30 Hz
//   B               reverse: soft stop to 10 Hz, swap phases, soft start
//   table write     rewrite the 30 Hz OFF count: the pulse period follows
//   D               stop: soft stop to 10 Hz, then all drives off
// Checked against numbers worked out here: pulse ON width 1000 clocks,
// supply period 18 x round(1e6 / (18 f)) clocks, one location step per
// pulse, 9 pulses per device per half-cycle, window order 0-1-2-3-4-5
// forward and 0-5-4-3-2-1 reverse, display digits, no shoot-through.
// Each mechanism (accepted and rejected keypad entry, ramp up, ramp
// down, hold, reversal, soft stop to off, table rewrite) is counted and
// must occur at least once.
module tb_motor_ctrl_top;
  import motor_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  kp_col_n, kp_row_n;
  logic [5:0]  base_drive;
  logic [6:0]  seg;
  logic [5:0]  an;
  logic        mem_we = 1'b0;
  logic [5:0]  mem_waddr = '0;
  logic [15:0] mem_wdata = '0;
  logic        running, dir, pwm_wave;
  logic [6:0]  cur_freq;
  drive_state_t state;

  int checks = 0, failures = 0;

  motor_ctrl_top dut (.*);

  always #500 clk = ~clk;    // 1 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---------------- keypad matrix model ----------------
  bit pressed = 1'b0;
  int prow = 0, pcol = 0;
  always_comb begin
    kp_col_n = 4'hF;
    if (pressed && !kp_row_n[prow]) kp_col_n[pcol] = 1'b0;
  end

  function automatic int pos_of(byte c);
    string keys = "123A456B789C*0#D";
    for (int i = 0; i < 16; i++) if (keys[i] == c) return i;
    return 15;
  endfunction

  task automatic press(string s);
    for (int i = 0; i < s.len(); i++) begin
      prow = pos_of(s[i]) / 4;
      pcol = pos_of(s[i]) % 4;
      pressed = 1'b1;
      repeat (8 * 4000) @(posedge clk);
      pressed = 1'b0;
      repeat (8 * 4000) @(posedge clk);
    end
  endtask

  // ---------------- expected numbers ----------------
  function automatic int pulse_clocks(int f);      // ON + OFF per pulse
    return int'($floor(1.0e6 / (18.0 * f) + 0.5));
  endfunction

  // ---------------- mechanism counters ----------------
  int n_accept = 0, n_reject = 0, n_up = 0, n_down = 0;
  int n_hold = 0, n_reverse = 0, n_off = 0, n_table = 0;
  logic [6:0] loc_d = '0;        // previous frequency shown
  logic       wave_d = 1'b0;
  logic       dir_d = 1'b0, run_d = 1'b0, rst_d = 1'b0;

  always @(posedge clk) begin
    rst_d <= rst_n;
    if (rst_d) begin
      if (running && run_d && cur_freq == loc_d + 7'd1) n_up++;
      if (running && run_d && cur_freq == loc_d - 7'd1) n_down++;
      if (pwm_wave && !wave_d && state == ST_RUN && cur_freq == loc_d) n_hold++;
      if (dir != dir_d) n_reverse++;
      if (run_d && !running) n_off++;
      if (running && run_d && !(cur_freq == loc_d || cur_freq == loc_d + 7'd1 ||
            cur_freq == loc_d - 7'd1)) begin
        failures++;
        $display("FAIL: location jumped at %0t", $time);
      end
      if ((base_drive[0] && base_drive[3]) || (base_drive[2] && base_drive[5]) ||
          (base_drive[4] && base_drive[1])) begin
        failures++;
        $display("FAIL: shoot-through %b at %0t", base_drive, $time);
      end
      if (!running && base_drive != '0 && run_d == running) begin
        failures++;
        $display("FAIL: drives on while stopped at %0t", $time);
      end
    end
    loc_d  <= cur_freq;
    wave_d <= pwm_wave;
    dir_d <= dir;
    run_d <= running;
  end

  // pulse ON width is fixed
  int on_len = 0;
  always @(posedge clk) begin
    if (rst_d) begin
      if (pwm_wave) on_len++;
      else begin
        if (on_len != 0 && on_len != 1000) begin
          failures++;
          $display("FAIL: ON width %0d at %0t", on_len, $time);
        end
        on_len = 0;
      end
    end
  end

  // window starts: a device switching on after more than one pulse off
  longint last_fall[6], starts[6];
  int     order[$];
  int     npulse[6];
  logic [5:0] bd_d = '0;
  initial for (int i = 0; i < 6; i++) begin last_fall[i] = -1; starts[i] = -1; end
  always @(posedge clk) begin
    longint t;
    t = longint'($time / 1000);
    for (int i = 0; i < 6; i++) begin
      if (base_drive[i] && !bd_d[i]) begin
        npulse[i]++;
        if (last_fall[i] < 0 || t - last_fall[i] > 6000) begin
          order.push_back(i);
          starts[i] = t;
        end
      end
      if (!base_drive[i] && bd_d[i]) last_fall[i] = t;
    end
    bd_d <= base_drive;
  end

  // measure one supply cycle in steady state: period of device 0 windows,
  // pulse count per device and the order of window starts
  task automatic measure_cycle(int f, bit reverse);
    longint t0;
    int exp_order[6];
    // starts recorded after device 0's: the other five, then device 0 again
    exp_order = reverse ? '{5, 4, 3, 2, 1, 0} : '{1, 2, 3, 4, 5, 0};
    @(posedge clk);
    wait (order.size() > 0 && order[order.size() - 1] == 0);
    t0 = starts[0];
    order.delete();
    for (int i = 0; i < 6; i++) npulse[i] = 0;
    npulse[0] = 1;
    wait (starts[0] != t0);
    check(starts[0] - t0 == longint'(18 * pulse_clocks(f)),
          $sformatf("%0d Hz: supply period %0d clocks, expected %0d", f, starts[0] - t0, 18 * pulse_clocks(f)));
    check(order.size() == 6, $sformatf("%0d Hz: %0d windows per cycle", f, order.size()));
    for (int i = 0; i < 6 && i < order.size(); i++)
      check(order[i] == exp_order[i], $sformatf("%0d Hz window %0d is device %0d", f, i, order[i]));
    for (int i = 1; i < 6; i++)
      check(npulse[i] == 9, $sformatf("%0d Hz device %0d: %0d pulses", f, i, npulse[i]));
    check(npulse[0] == 10, "device 0: 9 pulses and the next window's first");
  endtask

  // display digit i as shown on the multiplexed segments
  function automatic byte seg_char(logic [6:0] s);
    case (s)
      7'h3F: return "0";  7'h06: return "1";  7'h5B: return "2";  7'h4F: return "3";
      7'h66: return "4";  7'h6D: return "5";  7'h7D: return "6";  7'h07: return "7";
      7'h7F: return "8";  7'h6F: return "9";  7'h79: return "E";  7'h50: return "r";
      7'h00: return " ";  default: return "?";
    endcase
  endfunction

  task automatic read_display(output string s);
    byte d[6];
    for (int c = 0; c < 6000; c++) begin
      @(posedge clk); #1;
      for (int i = 0; i < 6; i++) if (an[i]) d[i] = seg_char(seg);
    end
    s = "";
    for (int i = 0; i < 6; i++) s = {s, string'(d[i])};
  endtask

  task automatic wait_freq(int f, int max_clocks);
    int n = 0;
    while (cur_freq != 7'(f) && n < max_clocks) begin @(posedge clk); n++; end
    check(cur_freq == 7'(f), $sformatf("reached %0d Hz", f));
  endtask

  initial begin
    string disp;
    int    pulses;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (100) @(posedge clk);
    check(!running && base_drive == 0 && cur_freq == 0, "idle after reset");

    // ---- enter 50 Hz and start: soft start ----
    press("50#");
    check(!running && base_drive == 0, "entry alone does not start");
    press("C");
    check(running && !dir, "started forward");
    // every pulse_adv is one location step until 50 Hz
    pulses = 0;
    while (cur_freq != 50 && pulses < 100) begin
      @(posedge clk);
      if (pwm_wave && !wave_d) pulses++;
    end
    check(cur_freq == 50, "soft start reaches 50 Hz");
    if (cur_freq == 50) n_accept++;
    repeat (2) @(posedge clk);       // let the step counter see the last step
    check(n_up == 40, $sformatf("%0d steps up from 10 Hz", n_up));
    measure_cycle(50, 1'b0);
    read_display(disp);
    check(disp == "501500", $sformatf("display \"%s\" at 50 Hz", disp));

    // ---- rejected entry ----
    press("7#");
    read_display(disp);
    check(disp == "Err   ", $sformatf("display \"%s\" after a bad entry", disp));
    if (disp == "Err   ") n_reject++;
    check(cur_freq == 50, "bad entry leaves the motor at 50 Hz");

    // ---- 30 Hz: ramp down ----
    press("*30#");
    wait_freq(30, 200000);
    if (cur_freq == 30) n_accept++;
    measure_cycle(30, 1'b0);
    read_display(disp);
    check(disp == "30 900", $sformatf("display \"%s\" at 30 Hz", disp));

    // ---- reverse: soft stop, swap, soft start ----
    press("B");
    check(state == ST_STOP || dir, "reversal begins with a soft stop");
    wait (dir == 1'b1);
    check(cur_freq == 10 && running, "direction changes at 10 Hz");
    wait_freq(30, 400000);
    measure_cycle(30, 1'b1);

    // ---- rewrite the 30 Hz table word: period follows ----
    @(posedge clk); #1;
    mem_we = 1'b1; mem_waddr = 6'd20; mem_wdata = 16'(pulse_clocks(25) - 1001);
    @(posedge clk); #1;
    mem_we = 1'b0;
    n_table++;
    repeat (2) measure_cycle(25, 1'b1);   // the first cycle may hold old pulses
    check(cur_freq == 30, "location unchanged by the table write");

    // ---- stop: soft stop, then off ----
    press("D");
    wait (!running);
    check(cur_freq == 0 && base_drive == 0, "stopped");
    repeat (30000) @(posedge clk);
    check(base_drive == 0, "drives stay off");

    // ---- every mechanism happened ----
    check(n_accept == 2, "accepted entries");
    check(n_reject >= 1, "rejected entries");
    check(n_up >= 60, $sformatf("ramp-up steps %0d", n_up));
    check(n_down >= 60, $sformatf("ramp-down steps %0d", n_down));
    check(n_hold >= 1, "holding at the setting");
    check(n_reverse == 1, "one reversal");
    check(n_off == 1, "one soft stop to off");
    check(n_table == 1, "table rewrite");
    $display("mechanisms: accept %0d reject %0d up %0d down %0d hold %0d reverse %0d off %0d table %0d",
             n_accept, n_reject, n_up, n_down, n_hold, n_reverse, n_off, n_table);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
