// tb_pwm_wave_gen: checks the PWM wave generator against the period formula.
// ON must last data1 + 1 clocks and OFF data2 + 1 clocks, the wave must start
// with an OFF period after reset, pulse_adv must mark exactly the clocks
// before each rising edge, and a new data2 must be used from the next OFF
// period on.
module tb_pwm_wave_gen;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] data1, data2;
  logic        q, q_n, pulse_adv;
  int          checks = 0, failures = 0;

  pwm_wave_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure one run of the current level of q_n, return its length.
  task automatic run_length(output int len, output bit level);
    level = q_n;
    len   = 0;
    while (q_n == level) begin
      check(q == !q_n, "q is the complement of q_n");
      check(pulse_adv == (level == 1'b0 && len == expected_off - 1),
            $sformatf("pulse_adv at off clock %0d", len));
      @(posedge clk); #1;
      len++;
    end
  endtask

  int expected_off;

  initial begin
    int  len;
    bit  level;
    data1 = 16'd5;
    data2 = 16'd7;
    expected_off = 8;
    #1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q_n == 1'b0, "wave starts low after reset");
    for (int p = 0; p < 6; p++) begin
      run_length(len, level);
      check(level == 1'b0 && len == expected_off, $sformatf("OFF length %0d", len));
      run_length(len, level);
      check(level == 1'b1 && len == int'(data1) + 1, $sformatf("ON length %0d", len));
      // counter-2 was loaded with data2 at the edge that ended this ON period
      expected_off = int'(data2) + 1;
      if (p == 2) data2 = 16'd20;   // too late for the OFF already running
    end
    // data changed while OFF is already running: takes effect next OFF
    run_length(len, level);
    check(len == 21, "OFF length after change");
    data2 = 16'd0;
    run_length(len, level);
    check(len == 6, "ON length unchanged");
    expected_off = 1;
    run_length(len, level);
    check(len == 1, "shortest OFF period");
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
