// tb_freq_sweep: the full operating range at default parameters.  Through
// the keypad model it starts the drive and then enters every frequency from
// 10 Hz to 50 Hz in turn.  At each one it waits for the ramp to arrive and
// checks, against numbers worked out here:
//   - the supply period (device 0 window to window) = 18 x round(1e6/(18 f));
//   - the pulse ON width = 1000 clocks and OFF width = period/18 - 1000,
//     so the duty is 1000 / round(1e6/(18 f)), proportional to f;
//   - the frequency digits on the display.
module tb_freq_sweep;
  import motor_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  kp_col_n, kp_row_n;
  logic [5:0]  base_drive;
  logic [6:0]  seg;
  logic [5:0]  an;
  logic        running, dir, pwm_wave;
  logic [6:0]  cur_freq;
  drive_state_t state;
  int          checks = 0, failures = 0;

  motor_ctrl_top dut (.clk, .rst_n, .kp_col_n, .kp_row_n, .base_drive, .seg, .an,
                      .mem_we(1'b0), .mem_waddr('0), .mem_wdata('0),
                      .running, .dir, .state, .pwm_wave, .cur_freq);

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  bit pressed = 1'b0;
  int prow = 0, pcol = 0;
  always_comb begin
    kp_col_n = 4'hF;
    if (pressed && !kp_row_n[prow]) kp_col_n[pcol] = 1'b0;
  end

  task automatic press(byte c);
    string keys = "123A456B789C*0#D";
    int p = 15;
    for (int i = 0; i < 16; i++) if (keys[i] == c) p = i;
    prow = p / 4;
    pcol = p % 4;
    pressed = 1'b1;
    repeat (6 * 4000) @(posedge clk);
    pressed = 1'b0;
    repeat (6 * 4000) @(posedge clk);
  endtask

  function automatic int pulse_clocks(int f);
    return int'($floor(1.0e6 / (18.0 * f) + 0.5));
  endfunction

  function automatic logic [6:0] digit_seg(int d);
    logic [6:0] t[10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
    return t[d];
  endfunction

  // length of the next high run and the low run after it of a signal
  task automatic wave_runs(output int hi, output int lo);
    @(posedge pwm_wave);
    hi = 0;
    while (pwm_wave) begin @(posedge clk); #1; hi++; end
    lo = 0;
    while (!pwm_wave) begin @(posedge clk); #1; lo++; end
  endtask

  task automatic device0_period(output longint per);
    longint t0;
    // a window start: device 0 rises after being off for more than a pulse
    int off_clocks = 0;
    forever begin
      @(posedge clk); #1;
      if (base_drive[0]) begin
        if (off_clocks > 2 * pulse_clocks(int'(cur_freq))) break;
        off_clocks = 0;
      end else off_clocks++;
    end
    t0 = longint'($time / 1000);
    off_clocks = 0;
    forever begin
      @(posedge clk); #1;
      if (base_drive[0]) begin
        if (off_clocks > 2 * pulse_clocks(int'(cur_freq))) break;
        off_clocks = 0;
      end else off_clocks++;
    end
    per = longint'($time / 1000) - t0;
  endtask

  initial begin
    int     hi, lo, n;
    longint per;
    logic [6:0] shown[2];
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    press("C");
    check(running, "started");
    for (int f = 10; f <= 50; f++) begin
      press(byte'("0" + f / 10));
      press(byte'("0" + f % 10));
      press("#");
      n = 0;
      while (cur_freq != 7'(f) && n < 200000) begin @(posedge clk); n++; end
      check(cur_freq == 7'(f), $sformatf("reached %0d Hz", f));
      repeat (2) wave_runs(hi, lo);      // let the new OFF count settle in
      check(hi == 1000, $sformatf("%0d Hz: ON %0d clocks", f, hi));
      check(lo == pulse_clocks(f) - 1000,
            $sformatf("%0d Hz: OFF %0d clocks, expected %0d", f, lo, pulse_clocks(f) - 1000));
      device0_period(per);
      check(per == longint'(18 * pulse_clocks(f)),
            $sformatf("%0d Hz: period %0d clocks, expected %0d", f, per, 18 * pulse_clocks(f)));
      // display digits 0 and 1
      for (int c = 0; c < 6000; c++) begin
        @(posedge clk); #1;
        if (an[0]) shown[0] = seg;
        if (an[1]) shown[1] = seg;
      end
      check(shown[0] == digit_seg(f / 10) && shown[1] == digit_seg(f % 10),
            $sformatf("%0d Hz on the display", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
