// tb_phase_shift_drive: feeds random OP-1 values, one per pulse, into a 3-bit
// and a 6-bit phase_shift_drive and checks that each outputs the value from
// 3 and 6 pulses earlier (0 before that many pulses have passed), gated by
// the wave for the upper device and inverted for the lower one.
module tb_phase_shift_drive;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pulse_adv = 1'b0, wave = 1'b0, op1 = 1'b0;
  logic sh3, hi3, lo3, sh6, hi6, lo6;
  int   checks = 0, failures = 0;
  bit   hist[$];

  phase_shift_drive #(.DEPTH(3)) dut3 (.clk, .rst_n, .pulse_adv, .op1, .wave,
                                       .shifted(sh3), .bd_hi(hi3), .bd_lo(lo3));
  phase_shift_drive #(.DEPTH(6)) dut6 (.clk, .rst_n, .pulse_adv, .op1, .wave,
                                       .shifted(sh6), .bd_hi(hi6), .bd_lo(lo6));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit past(int d);
    return (hist.size() >= d) ? hist[hist.size() - d] : 1'b0;
  endfunction

  initial begin
    #1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 60; p++) begin
      wave = 1'b0;
      @(posedge clk); #1;
      check(!hi3 && !lo3 && !hi6 && !lo6, "all off while the wave is low");
      pulse_adv = 1'b1;
      @(posedge clk); #1;
      pulse_adv = 1'b0;
      hist.push_back(op1);        // value shifted in at that edge
      op1  = 1'($urandom_range(0, 1));
      wave = 1'b1;
      #0;
      check(sh3 == past(3), $sformatf("3-bit delay at pulse %0d", p));
      check(sh6 == past(6), $sformatf("6-bit delay at pulse %0d", p));
      check(hi3 == sh3 && lo3 == !sh3, "3-bit leg gating");
      check(hi6 == sh6 && lo6 == !sh6, "6-bit leg gating");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
