// tb_key_entry: presses key sequences by matrix position and checks the
// accepted frequency, the error flag and the one-clock command strobes.
// Layout:  1 2 3 A / 4 5 6 B / 7 8 9 C / * 0 # D
// (A forward, B reverse, C start, D stop, * clear, # enter).
module tb_key_entry;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       key_valid = 1'b0;
  logic [3:0] key_pos = '0;
  logic [6:0] freq_set;
  logic       err, start, stop, fwd, rev;
  int         checks = 0, failures = 0;
  int         n_start = 0, n_stop = 0, n_fwd = 0, n_rev = 0;

  key_entry dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      n_start += int'(start);
      n_stop  += int'(stop);
      n_fwd   += int'(fwd);
      n_rev   += int'(rev);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (freq %0d err %0b)", what, freq_set, err);
    end
  endtask

  // matrix position of a key character
  function automatic logic [3:0] pos_of(byte c);
    case (c)
      "1": return 4'h0;  "2": return 4'h1;  "3": return 4'h2;  "A": return 4'h3;
      "4": return 4'h4;  "5": return 4'h5;  "6": return 4'h6;  "B": return 4'h7;
      "7": return 4'h8;  "8": return 4'h9;  "9": return 4'hA;  "C": return 4'hB;
      "*": return 4'hC;  "0": return 4'hD;  "#": return 4'hE;  default: return 4'hF;
    endcase
  endfunction

  task automatic keys(string s);
    for (int i = 0; i < s.len(); i++) begin
      #1 key_valid = 1'b1;
      key_pos = pos_of(s[i]);
      @(posedge clk);
      #1 key_valid = 1'b0;
      repeat (3) @(posedge clk);
    end
  endtask

  initial begin
    @(posedge clk);
    #1 rst_n = 1'b1;
    check(freq_set == 10 && !err, "reset setting 10 Hz");
    keys("35#");  check(freq_set == 35 && !err, "35 Hz accepted");
    keys("7#");   check(freq_set == 35 && err,  "7 Hz rejected");
    keys("*");    check(freq_set == 35 && !err, "clear drops the error");
    keys("60#");  check(freq_set == 35 && err,  "60 Hz rejected");
    keys("123#"); check(freq_set == 23 && !err, "last two digits used");
    keys("50#");  check(freq_set == 50 && !err, "50 Hz accepted");
    keys("10#");  check(freq_set == 10 && !err, "10 Hz accepted");
    keys("51#");  check(freq_set == 10 && err,  "51 Hz rejected");
    keys("4*9#"); check(freq_set == 10 && err,  "clear empties the entry (09)");
    keys("48#");  check(freq_set == 48 && !err, "48 Hz accepted");
    check(n_start == 0 && n_stop == 0 && n_fwd == 0 && n_rev == 0, "digits give no commands");
    keys("A");    check(n_fwd == 1 && n_rev == 0 && n_start == 0 && n_stop == 0, "A is forward");
    keys("B");    check(n_fwd == 1 && n_rev == 1 && n_start == 0 && n_stop == 0, "B is reverse");
    keys("C");    check(n_start == 1 && n_stop == 0, "C is start");
    keys("D");    check(n_stop == 1 && n_start == 1, "D is stop");
    keys("CC");   check(n_start == 3, "one strobe per press");
    check(freq_set == 48, "commands leave the setting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
