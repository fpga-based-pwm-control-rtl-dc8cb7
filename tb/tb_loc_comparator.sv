// tb_loc_comparator: all 64 x 64 location pairs against the truth table
// GTH = (a > b), LTH = (a < b), ET = (a == b), exactly one of them high.
module tb_loc_comparator;
  logic [5:0] a, b;
  logic       gth, lth, et;
  int         checks = 0, failures = 0;

  loc_comparator dut (.*);

  initial begin
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        a = 6'(i);
        b = 6'(j);
        #1;
        checks++;
        if (gth != (i > j) || lth != (i < j) || et != (i == j) ||
            (int'(gth) + int'(lth) + int'(et)) != 1) begin
          failures++;
          $display("FAIL: a=%0d b=%0d -> %b%b%b", i, j, gth, lth, et);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
