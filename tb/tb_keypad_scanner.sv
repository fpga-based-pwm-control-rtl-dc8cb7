// tb_keypad_scanner: a 4x4 key matrix model (a closed key pulls its column
// low while its row is driven low) in front of the scanner, run with short
// scan slots.  Each of the 16 keys, held for 10 scans and released, must give
// exactly one key_valid with its {row, column} position, and no more while
// held.  A contact that bounces between scans must give nothing until it settles; a key held
// for less than the debounce time must give nothing.  row_n must always drive
// exactly one row low.
module tb_keypad_scanner;
  localparam int SCAN_DIV = 4, DEBOUNCE = 3, SCAN = 4 * SCAN_DIV;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] col_n, row_n, key_pos;
  logic       key_valid;
  bit         pressed = 1'b0;
  int         prow = 0, pcol = 0;
  int         checks = 0, failures = 0;
  int         events = 0;
  logic [3:0] last_pos = '0;

  keypad_scanner #(.SCAN_DIV(SCAN_DIV), .DEBOUNCE(DEBOUNCE)) dut (.*);

  always_comb begin
    col_n = 4'hF;
    if (pressed && !row_n[prow]) col_n[pcol] = 1'b0;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && key_valid) begin
      events++;
      last_pos = key_pos;
    end
    if (rst_n && !$onehot(~row_n)) begin
      failures++;
      $display("FAIL: row drive %b", row_n);
    end
  end

  initial begin
    @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3 * SCAN) @(posedge clk);
    check(events == 0, "no key, no event");
    for (int k = 0; k < 16; k++) begin
      events = 0;
      prow = k / 4;
      pcol = k % 4;
      pressed = 1'b1;
      repeat (10 * SCAN) @(posedge clk);
      check(events == 1, $sformatf("key %0d: %0d events while held", k, events));
      check(int'(last_pos) == k, $sformatf("key %0d reported as %0d", k, last_pos));
      pressed = 1'b0;
      repeat (10 * SCAN) @(posedge clk);
      check(events == 1, $sformatf("key %0d: no event on release", k));
    end
    // bouncing contact: changes once per scan for 8 scans, then settles
    events = 0;
    prow = 2; pcol = 1;
    for (int i = 0; i < 8; i++) begin
      pressed = !pressed;
      repeat (SCAN) @(posedge clk);
    end
    check(events == 0, $sformatf("bouncing gives %0d events", events));
    pressed = 1'b1;
    repeat (10 * SCAN) @(posedge clk);
    check(events == 1 && last_pos == 4'd9, "settled key reported once");
    pressed = 1'b0;
    repeat (10 * SCAN) @(posedge clk);
    // shorter than the debounce time
    events = 0;
    prow = 0; pcol = 3;
    pressed = 1'b1;
    repeat ((DEBOUNCE - 1) * SCAN - 2) @(posedge clk);
    pressed = 1'b0;
    repeat (10 * SCAN) @(posedge clk);
    check(events == 0, "short press ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * SCAN) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
