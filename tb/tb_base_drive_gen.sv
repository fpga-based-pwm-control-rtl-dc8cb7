// tb_base_drive_gen: drives base_drive_gen with a synthetic PWM wave (ON 2
// clocks, OFF 3 clocks) and checks that OP-1 is high for pulses 0..8 and low
// for pulses 9..17 of every 18-pulse cycle, that base drive 0 and 3 are the
// wave gated by OP-1 and its inverse, that each gets 9 pulses per cycle and
// that they never overlap.
module tb_base_drive_gen;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       pulse_adv = 1'b0, wave = 1'b0;
  logic       op1, bd0, bd3;
  logic [4:0] pulse_idx;
  int         checks = 0, failures = 0;
  int         k = -1;               // index of the pulse now on the wave
  int         n0 = 0, n3 = 0;
  logic       bd0_d = 1'b0, bd3_d = 1'b0;

  base_drive_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (pulse %0d)", what, k);
    end
  endtask

  initial begin
    #1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 3 * 18; p++) begin
      // OFF: 3 clocks, pulse_adv in the last one
      wave = 1'b0;
      @(posedge clk); #1;
      @(posedge clk); #1;
      pulse_adv = 1'b1;
      @(posedge clk); #1;
      pulse_adv = 1'b0;
      wave = 1'b1;
      k++;
      #1;
      for (int c = 0; c < 2; c++) begin
        check(op1 == ((k % 18) < 9), "op1 level");
        check(int'(pulse_idx) == k % 18, "pulse index");
        check(bd0 == op1 && bd3 == !op1, "base drives follow op1 during ON");
        @(posedge clk); #1;
      end
      wave = 1'b0;
      #1;
      check(!bd0 && !bd3, "both drives off during OFF");
      if ((k % 18) == 17) begin
        check(n0 == 9 && n3 == 9, $sformatf("pulses per cycle %0d/%0d", n0, n3));
        n0 = 0;
        n3 = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    bd0_d <= bd0;
    bd3_d <= bd3;
    if (bd0 && !bd0_d) n0++;
    if (bd3 && !bd3_d) n3++;
    if (bd0 && bd3) begin
      failures++;
      $display("FAIL: drives 0 and 3 overlap");
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
