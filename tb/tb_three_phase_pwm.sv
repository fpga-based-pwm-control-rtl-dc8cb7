// tb_three_phase_pwm: runs the six-output PWM stage with short counts (ON 2
// clocks, OFF 3 clocks, 5 clocks per pulse, 90 per supply cycle) and checks:
//  - every clock, the registered drives against a model written from the
//    pulse number k:  OP-1(k) = (k mod 18) < 9, device 0 = OP-1(k),
//    device 1 = OP-1(k-3), device 2 = OP-1(k-6), devices 3/4/5 their inverses,
//    all gated by the wave, Y and B legs swapped in reverse;
//  - conduction windows start in the order 0-1-2-3-4-5 forward and
//    0-5-4-3-2-1 reverse, one supply cycle (90 clocks) apart per device;
//  - 9 pulses per device per supply cycle, no shoot-through, all off when
//    disabled.
module tb_three_phase_pwm;
  localparam int ON = 2, OFF = 3, PER = ON + OFF, CYC = 18 * PER;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en = 1'b1, dir = 1'b0;
  logic [5:0] base_drive;
  logic       wave, pulse_adv;
  int         checks = 0, failures = 0;

  three_phase_pwm dut (.clk, .rst_n, .on_count(16'(ON - 1)), .off_count(16'(OFF - 1)),
                       .en, .dir, .base_drive, .wave, .pulse_adv);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic bit op1(int j);
    return (j >= 0) && ((j % 18) < 9);
  endfunction

  function automatic logic [5:0] model(int k, bit w, bit d, bit e);
    logic [5:0] f, m;
    if (!w || !e) return '0;
    f[0] = op1(k);     f[3] = !op1(k);
    f[1] = op1(k - 3); f[4] = !op1(k - 3);
    f[2] = op1(k - 6); f[5] = !op1(k - 6);
    m = f;
    if (d) begin
      m[2] = f[4]; m[4] = f[2]; m[5] = f[1]; m[1] = f[5];
    end
    return m;
  endfunction

  // ---- cycle-by-cycle model check ----
  int         k = -1, cyc = 0;
  bit         wave_d = 1'b0, dir_d = 1'b0, en_d = 1'b0;
  int         k_d = -1;
  logic [5:0] bd_d = '0;
  int         last_fall[6], last_start[6], npulse[6];
  int         order[$];

  initial begin
    for (int i = 0; i < 6; i++) begin
      last_fall[i] = -1000; last_start[i] = -1; npulse[i] = 0;
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      cyc++;
      if (wave && !wave_d) k++;
      check(base_drive == model(k_d, wave_d, dir_d, en_d),
            $sformatf("drives %b, model %b, pulse %0d", base_drive, model(k_d, wave_d, dir_d, en_d), k_d));
      for (int i = 0; i < 6; i++) begin
        if (base_drive[i] && !bd_d[i]) begin
          npulse[i]++;
          if (cyc - last_fall[i] > PER) begin       // a new conduction window
            order.push_back(i);
            if (last_start[i] >= 0 && k > 36 && k < 54)
              check(cyc - last_start[i] == CYC, $sformatf("device %0d period %0d", i, cyc - last_start[i]));
            last_start[i] = cyc;
          end
        end
        if (!base_drive[i] && bd_d[i]) last_fall[i] = cyc;
      end
      wave_d = wave;
      k_d    = k;
      dir_d  = dir;
      en_d   = en;
      bd_d   = base_drive;
    end
  end

  task automatic wait_pulse(int n);
    repeat (n) @(posedge pulse_adv);
  endtask

  initial begin
    int exp_fwd[6] = '{0, 1, 2, 3, 4, 5};
    int exp_rev[6] = '{0, 5, 4, 3, 2, 1};
    #1;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    // forward: skip the start-up, then one full supply cycle from pulse 18
    wait (k == 17);
    @(posedge clk);
    wait (k == 18);
    order.delete();
    for (int i = 0; i < 6; i++) npulse[i] = 0;
    wait (k == 36);
    for (int i = 0; i < 6; i++) check(npulse[i] == 9, $sformatf("device %0d: %0d pulses per cycle", i, npulse[i]));
    check(order.size() >= 6, "six windows per cycle");
    for (int i = 0; i < 6 && i < order.size(); i++)
      check(order[i] == exp_fwd[i], $sformatf("forward order slot %0d is device %0d", i, order[i]));
    wait (k == 53);
    // reverse: swap at a cycle boundary so the sequence is clean
    @(negedge wave);
    dir = 1'b1;
    // the first reverse cycle still holds windows cut by the swap
    wait (k == 72);
    order.delete();
    for (int i = 0; i < 6; i++) npulse[i] = 0;
    wait (k == 90);
    for (int i = 0; i < 6; i++) check(npulse[i] == 9, $sformatf("reverse device %0d: %0d pulses", i, npulse[i]));
    check(order.size() >= 6, "six windows per reverse cycle");
    for (int i = 0; i < 6 && i < order.size(); i++)
      check(order[i] == exp_rev[i], $sformatf("reverse order slot %0d is device %0d", i, order[i]));
    // disable: all drives off
    @(posedge clk); #0.5;
    en = 1'b0;
    wait (k == 100);
    check(base_drive == '0, "disabled drives are off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120 * PER * 18 / 10 * 10) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
