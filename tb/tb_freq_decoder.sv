// tb_freq_decoder: every frequency 0..127 Hz; 10..50 must map to location
// f - 10 with valid high, everything else to location 0 with valid low.
module tb_freq_decoder;
  logic [6:0] freq;
  logic [5:0] loc;
  logic       valid;
  int         checks = 0, failures = 0;

  freq_decoder dut (.*);

  initial begin
    for (int f = 0; f < 128; f++) begin
      freq = 7'(f);
      #1;
      checks++;
      if (f >= 10 && f <= 50) begin
        if (!(valid && int'(loc) == f - 10)) begin
          failures++;
          $display("FAIL: %0d Hz -> loc %0d valid %0b", f, loc, valid);
        end
      end else if (valid || loc != 0) begin
        failures++;
        $display("FAIL: %0d Hz accepted", f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
