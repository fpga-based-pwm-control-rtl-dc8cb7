// tb_off_time_mem: reads every word of the OFF-count table and compares it
// with round(1e6 / (18 f)) - 1001 for f = 10..50 Hz, computed here in real
// arithmetic; checks that the resulting pulse duty is proportional to f
// (constant V/f), that reads take one clock, and that a written word reads
// back while its neighbours keep their values.
module tb_off_time_mem;
  logic        clk = 1'b0;
  logic [5:0]  raddr = '0, waddr = '0;
  logic [15:0] rdata, wdata = '0;
  logic        we = 1'b0;
  int          checks = 0, failures = 0;

  off_time_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expected(int f);
    real period;
    period = 1.0e6 / (18.0 * f);
    return int'($floor(period + 0.5)) - 1001;
  endfunction

  initial begin
    real duty, ratio;
    @(posedge clk); #1;
    for (int a = 0; a < 41; a++) begin
      raddr = 6'(a);
      @(posedge clk); #1;
      check(int'(rdata) == expected(10 + a),
            $sformatf("word %0d: %0d, expected %0d", a, rdata, expected(10 + a)));
      duty  = 1000.0 / (1000.0 + real'(rdata) + 1.0);
      ratio = duty / (10.0 + a) * 50.0;          // duty relative to 50 Hz line
      check(ratio > 0.895 && ratio < 0.905, $sformatf("V/f at %0d Hz: %f", 10 + a, ratio));
    end
    // one clock read latency
    raddr = 6'd0;
    @(posedge clk); #1;
    raddr = 6'd40;
    #1 check(int'(rdata) == expected(10), "old word still shown before the edge");
    @(posedge clk); #1;
    check(int'(rdata) == expected(50), "new word after one edge");
    // write and read back
    we = 1'b1; waddr = 6'd20; wdata = 16'h1234;
    @(posedge clk); #1;
    we = 1'b0;
    raddr = 6'd20;
    @(posedge clk); #1;
    check(rdata == 16'h1234, "written word reads back");
    raddr = 6'd21;
    @(posedge clk); #1;
    check(int'(rdata) == expected(31), "neighbour unchanged");
    raddr = 6'd50;
    @(posedge clk); #1;
    check(rdata == '0, "address beyond the table reads 0");
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
