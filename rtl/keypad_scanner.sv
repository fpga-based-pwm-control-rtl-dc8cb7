// keypad_scanner: scans a 4x4 matrix keypad and reports each debounced key
// press once.
//
// Rows are driven low one at a time (row_n, active low) for SCAN_DIV clocks
// each; the columns (col_n, active low, pulled up off chip) pass through a
// two-flop synchronizer and are sampled in the last clock of each row slot.
// After the fourth row the scan result is either "no key" or the position
// {row, column} of the lowest-numbered pressed key.  A result must repeat for
// DEBOUNCE full scans to count: a stable key produces one key_valid strobe
// with its position in key_pos, and a stable "no key" re-arms the scanner
// for the next press.
//
// The source only states that a 4x4 matrix keypad gives the user's inputs;
// the scan scheme, timing and debouncing are this design's.  With a 1 MHz
// clock the defaults give a 4 ms scan and 16 ms of debouncing.
module keypad_scanner #(
  parameter int unsigned SCAN_DIV = 1000,
  parameter int unsigned DEBOUNCE = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] col_n,      // column inputs, low = key closed
  output logic [3:0] row_n,      // row drives, one low at a time
  output logic       key_valid,  // one-clock strobe per debounced press
  output logic [3:0] key_pos     // {row[1:0], col[1:0]} of that key
);

  localparam int unsigned DW = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;
  localparam int unsigned BW = $clog2(DEBOUNCE + 1);

  logic [DW-1:0] div;
  logic [1:0]    row;
  logic [3:0]    col_s1, col_s2;
  logic          slot_end;
  logic          hit_acc, scan_hit, last_hit, reported;
  logic [3:0]    pos_acc, scan_pos, last_pos;
  logic [BW-1:0] stable, stable_n;
  logic          same;
  logic          found;
  logic [1:0]    found_col;

  assign slot_end = (div == DW'(SCAN_DIV - 1));
  assign row_n    = ~(4'b0001 << row);

  always_comb begin
    found     = 1'b0;
    found_col = '0;
    for (int c = 3; c >= 0; c--) begin
      if (!col_s2[c]) begin
        found     = 1'b1;
        found_col = 2'(c);
      end
    end
  end

  // Result of the scan that ends with the current (fourth) row slot.
  assign scan_hit = hit_acc || found;
  assign scan_pos = hit_acc ? pos_acc : {row, found_col};
  assign same     = (scan_hit == last_hit) && (!scan_hit || scan_pos == last_pos);
  assign stable_n = !same ? BW'(1) : (stable < BW'(DEBOUNCE)) ? stable + 1'b1 : stable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_s1    <= '1;
      col_s2    <= '1;
      div       <= '0;
      row       <= '0;
      hit_acc   <= 1'b0;
      pos_acc   <= '0;
      last_hit  <= 1'b0;
      last_pos  <= '0;
      stable    <= '0;
      reported  <= 1'b0;
      key_valid <= 1'b0;
      key_pos   <= '0;
    end else begin
      col_s1    <= col_n;
      col_s2    <= col_s1;
      key_valid <= 1'b0;
      div       <= slot_end ? '0 : div + 1'b1;
      if (slot_end) begin
        row <= row + 1'b1;
        // lowest row wins, then lowest column
        if (found && !hit_acc) begin
          hit_acc <= 1'b1;
          pos_acc <= {row, found_col};
        end
        if (row == 2'd3) begin
          // end of a full scan: judge the result, then start a new scan
          hit_acc <= 1'b0;
          stable  <= stable_n;
          if (stable_n == BW'(DEBOUNCE)) begin
            if (scan_hit && !reported) begin
              key_valid <= 1'b1;
              key_pos   <= scan_pos;
              reported  <= 1'b1;
            end else if (!scan_hit) begin
              reported  <= 1'b0;
            end
          end
          last_hit <= scan_hit;
          last_pos <= scan_pos;
        end
      end
    end
  end

endmodule
