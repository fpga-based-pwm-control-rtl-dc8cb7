// key_entry: turns keypad presses into the frequency setting and the motor
// commands.
//
// Key layout (row by row, key_pos = {row, column}):
//   1 2 3 A      A = forward      C = start      * = clear entry
//   4 5 6 B      B = reverse      D = stop       # = enter
//   7 8 9 C
//   * 0 # D
// Digits shift into a two-digit decimal entry.  Enter converts it to binary;
// a value in F_MIN_HZ..F_MAX_HZ becomes the frequency setting (freq_set),
// anything else leaves the setting alone and raises err, which the display
// shows as an error message.  Clear empties the entry and drops err.  A, B,
// C and D give one-clock command strobes.  freq_set resets to F_MIN_HZ.
//
// That the keypad enters frequency, direction, start and stop, that the range
// is 10..50 Hz and that errors are displayed follows the source; the layout,
// the two-digit decimal entry and the enter/clear keys are this design's.
module key_entry #(
  parameter int unsigned FREQ_W   = motor_pkg::FREQ_W,
  parameter int unsigned F_MIN_HZ = motor_pkg::F_MIN_HZ,
  parameter int unsigned F_MAX_HZ = motor_pkg::F_MAX_HZ
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              key_valid,
  input  logic [3:0]        key_pos,
  output logic [FREQ_W-1:0] freq_set,   // accepted frequency, Hz
  output logic              err,        // last entry was out of range
  output logic              start,
  output logic              stop,
  output logic              fwd,
  output logic              rev
);
  import motor_pkg::*;

  key_t       key;
  logic [3:0] d_hi, d_lo;
  logic [6:0] value;

  always_comb begin
    unique case (key_pos)
      4'h0: key = KEY_1;     4'h1: key = KEY_2;   4'h2: key = KEY_3;     4'h3: key = KEY_FWD;
      4'h4: key = KEY_4;     4'h5: key = KEY_5;   4'h6: key = KEY_6;     4'h7: key = KEY_REV;
      4'h8: key = KEY_7;     4'h9: key = KEY_8;   4'hA: key = KEY_9;     4'hB: key = KEY_START;
      4'hC: key = KEY_CLEAR; 4'hD: key = KEY_0;   4'hE: key = KEY_ENTER; default: key = KEY_STOP;
    endcase
  end

  assign value = 7'(d_hi) * 7'd10 + 7'(d_lo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_hi     <= '0;
      d_lo     <= '0;
      freq_set <= FREQ_W'(F_MIN_HZ);
      err      <= 1'b0;
      start    <= 1'b0;
      stop     <= 1'b0;
      fwd      <= 1'b0;
      rev      <= 1'b0;
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      fwd   <= 1'b0;
      rev   <= 1'b0;
      if (key_valid) begin
        case (key)
          KEY_FWD:   fwd   <= 1'b1;
          KEY_REV:   rev   <= 1'b1;
          KEY_START: start <= 1'b1;
          KEY_STOP:  stop  <= 1'b1;
          KEY_CLEAR: begin
            d_hi <= '0;
            d_lo <= '0;
            err  <= 1'b0;
          end
          KEY_ENTER: begin
            if (value >= 7'(F_MIN_HZ) && value <= 7'(F_MAX_HZ)) begin
              freq_set <= FREQ_W'(value);
              err      <= 1'b0;
            end else begin
              err      <= 1'b1;
            end
            d_hi <= '0;
            d_lo <= '0;
          end
          default: begin        // a digit
            d_hi <= d_lo;
            d_lo <= key;
          end
        endcase
      end
    end
  end

endmodule
