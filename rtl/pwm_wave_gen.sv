// pwm_wave_gen: PWM square wave with a fixed ON period and a variable OFF
// period, the pulse source of the whole controller.
//
// Two 16-bit down counters share the work.  Counter-1 times the ON period
// and is loaded with data1; counter-2 times the OFF period and is loaded with
// data2, the OFF count read from the frequency table.  A T flip-flop chooses
// which counter runs (Q = 0: counter-1, Q = 1: counter-2).  Each counter's
// all-zero detector (a NOR over its bits) is gated by its select, the two are
// XORed and drive the T input; when the running counter reaches zero the
// flip-flop toggles and the other counter starts from its freshly loaded
// value.  The square wave is Q-bar (q_n): high for data1 + 1 clocks, low for
// data2 + 1 clocks.  data2 is sampled when an OFF period begins, so a new
// frequency takes effect at the next pulse.
//
// The counter structure, the 16-bit width, the T flip-flop with preset and
// the output on Q-bar follow the source.  This design's own choices: all
// logic runs on the one system clock (the flip-flop toggles through a clock
// enable), counters load when their period starts, and reset presets Q, so
// the wave starts with an OFF period.
//
// Interface: pulse_adv is a combinational strobe, high in the clock cycle
// whose rising edge turns q_n from 0 to 1.  Downstream pulse-counting logic
// updates on that same edge, which plays the part of "Q-bar as clock".
module pwm_wave_gen #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] data1,      // ON count (ON lasts data1 + 1 clocks)
  input  logic [CNT_W-1:0] data2,      // OFF count (OFF lasts data2 + 1 clocks)
  output logic             q,          // T flip-flop Q, counter select
  output logic             q_n,        // T flip-flop Q-bar, the PWM wave
  output logic             pulse_adv   // q_n rises at the next clock edge
);

  logic [CNT_W-1:0] cnt1, cnt2;
  logic             nor1, nor2, t;

  assign nor1 = ~|cnt1;
  assign nor2 = ~|cnt2;
  // Only the selected counter may toggle the flip-flop.
  assign t    = (nor1 & ~q) ^ (nor2 & q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= 1'b1;          // preset: start in the OFF period
      cnt1 <= data1;
      cnt2 <= data2;
    end else if (t) begin
      q <= ~q;
      if (q) cnt1 <= data1;  // OFF ends: counter-1 starts the ON period
      else   cnt2 <= data2;  // ON ends: counter-2 starts the OFF period
    end else if (q) begin
      cnt2 <= cnt2 - 1'b1;
    end else begin
      cnt1 <= cnt1 - 1'b1;
    end
  end

  assign q_n       = ~q;
  assign pulse_adv = t & q;

endmodule
