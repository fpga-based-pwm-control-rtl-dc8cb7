// seg7_display: six-digit multiplexed 7-segment display of the present
// supply frequency and the matching motor speed, or an error message.
//
// Digits 0-1 show the frequency in hertz, digits 2-5 the synchronous speed
// 120 f / POLES in rpm (leading zeros of the speed blanked).  While err is
// high the display reads "Err" on digits 0-2.  One digit is lit at a time
// for DIGIT_CYCLES clocks; an (digit enable) and seg (segments a..g in bits
// 0..6) are active high and registered.  Digit 0 is the leftmost.
//
// That the frequency, speed and error messages are shown on 7-segment LEDs,
// and the speed formula 120 f / P, follow the source.  The digit count, the
// multiplexing, the pole number (4) and the message are this design's.
module seg7_display #(
  parameter int unsigned FREQ_W       = motor_pkg::FREQ_W,
  parameter int unsigned POLES        = 4,
  parameter int unsigned DIGIT_CYCLES = 1000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FREQ_W-1:0] freq,   // present supply frequency, Hz
  input  logic              err,
  output logic [6:0]        seg,
  output logic [5:0]        an
);

  localparam int unsigned DW = (DIGIT_CYCLES > 1) ? $clog2(DIGIT_CYCLES) : 1;
  // glyph codes beyond the decimal digits
  localparam logic [4:0] G_BLANK = 5'd16, G_E = 5'd17, G_R = 5'd18;

  logic [DW-1:0] div;
  logic [2:0]    digit;
  logic [13:0]   rpm;
  logic [4:0]    glyph;

  assign rpm = 14'((32'(freq) * 120) / POLES);

  always_comb begin
    if (err) begin
      unique case (digit)
        3'd0:    glyph = G_E;
        3'd1:    glyph = G_R;
        3'd2:    glyph = G_R;
        default: glyph = G_BLANK;
      endcase
    end else begin
      unique case (digit)
        3'd0:    glyph = 5'((32'(freq) / 10) % 10);
        3'd1:    glyph = 5'(32'(freq) % 10);
        3'd2:    glyph = (rpm >= 14'd1000) ? 5'((32'(rpm) / 1000) % 10) : G_BLANK;
        3'd3:    glyph = (rpm >= 14'd100)  ? 5'((32'(rpm) / 100) % 10)  : G_BLANK;
        3'd4:    glyph = (rpm >= 14'd10)   ? 5'((32'(rpm) / 10) % 10)   : G_BLANK;
        default: glyph = 5'(32'(rpm) % 10);
      endcase
    end
  end

  function automatic logic [6:0] segments(input logic [4:0] g);
    unique case (g)        //  gfedcba
      5'd0:    return 7'b0111111;
      5'd1:    return 7'b0000110;
      5'd2:    return 7'b1011011;
      5'd3:    return 7'b1001111;
      5'd4:    return 7'b1100110;
      5'd5:    return 7'b1101101;
      5'd6:    return 7'b1111101;
      5'd7:    return 7'b0000111;
      5'd8:    return 7'b1111111;
      5'd9:    return 7'b1101111;
      G_E:     return 7'b1111001;
      G_R:     return 7'b1010000;
      default: return 7'b0000000;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div   <= '0;
      digit <= '0;
      seg   <= '0;
      an    <= '0;
    end else begin
      if (div == DW'(DIGIT_CYCLES - 1)) begin
        div   <= '0;
        digit <= (digit == 3'd5) ? '0 : digit + 1'b1;
      end else begin
        div <= div + 1'b1;
      end
      seg <= segments(glyph);
      an  <= 6'(1) << digit;
    end
  end

endmodule
