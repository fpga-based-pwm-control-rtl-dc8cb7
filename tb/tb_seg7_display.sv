// tb_seg7_display: runs the display multiplexer with 3 clocks per digit and
// decodes what is lit: each frequency 0..50 Hz must appear as two digits and
// the speed 120 f / 4 rpm with leading zeros blanked, and err must show
// "Err".  Exactly one digit is enabled at any time, and all six take turns.
module tb_seg7_display;
  localparam int DC = 3;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [6:0] freq = '0;
  logic       err = 1'b0;
  logic [6:0] seg;
  logic [5:0] an;
  int         checks = 0, failures = 0;

  seg7_display #(.DIGIT_CYCLES(DC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // segment patterns (bit 0 = a ... bit 6 = g), written out from the
  // usual 7-segment shapes
  function automatic byte glyph_char(logic [6:0] s);
    case (s)
      7'h3F: return "0";  7'h06: return "1";  7'h5B: return "2";  7'h4F: return "3";
      7'h66: return "4";  7'h6D: return "5";  7'h7D: return "6";  7'h07: return "7";
      7'h7F: return "8";  7'h6F: return "9";  7'h79: return "E";  7'h50: return "r";
      7'h00: return " ";  default: return "?";
    endcase
  endfunction

  // collect one full round of the six digits, return them as a string
  task automatic read_display(output string s);
    byte d[6];
    bit  seen[6];
    for (int i = 0; i < 6; i++) seen[i] = 1'b0;
    repeat (6 * DC + 2) @(posedge clk);   // let new inputs reach every digit
    for (int c = 0; c < 6 * DC; c++) begin
      @(posedge clk); #1;
      check($onehot(an), "one digit enabled");
      for (int i = 0; i < 6; i++) begin
        if (an[i]) begin
          d[i]    = glyph_char(seg);
          seen[i] = 1'b1;
        end
      end
    end
    s = "";
    for (int i = 0; i < 6; i++) begin
      check(seen[i], $sformatf("digit %0d lit", i));
      s = {s, string'(d[i])};
    end
  endtask

  initial begin
    string got, want, rpm;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f <= 50; f += 5) begin
      freq = 7'(f);
      read_display(got);
      rpm  = $sformatf("%4d", f * 30);
      if (f == 0) rpm = "   0";
      want = {$sformatf("%02d", f), rpm};
      check(got == want, $sformatf("%0d Hz shows \"%s\", expected \"%s\"", f, got, want));
    end
    freq = 7'd37;
    read_display(got);
    check(got == "371110", $sformatf("37 Hz shows \"%s\"", got));
    err = 1'b1;
    read_display(got);
    check(got == "Err   ", $sformatf("error shows \"%s\"", got));
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
