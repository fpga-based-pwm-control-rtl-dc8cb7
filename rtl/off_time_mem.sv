// off_time_mem: table of OFF-period counts, one word per selectable supply
// frequency, read by memory location.
//
// Word k holds the counter-2 load value for F_MIN_HZ + k hertz.  Since the ON
// period is fixed, a longer OFF period gives both a lower frequency and a
// proportionally smaller pulse duty, so the bridge voltage falls with the
// frequency (constant V/f).  The table is filled at configuration time from
//   off(f) = round(CLK_HZ / (18 f)) - ON_COUNT - 2
// (see motor_pkg::off_count) and can be rewritten through the write port.
// Reads are synchronous: rdata shows the word at raddr one clock later.
//
// A RAM of OFF counts addressed by a location derived from the keypad
// frequency follows the source, which gives its size as 80 bytes.  The word
// width (16 bits, the width of counter-2), the depth of 41 words (10..50 Hz in
// 1 Hz steps, 82 bytes), the contents formula and the write port are this
// design's choices.
module off_time_mem #(
  parameter int unsigned DEPTH    = motor_pkg::FREQ_STEPS,
  parameter int unsigned W        = motor_pkg::CNT_W,
  parameter int unsigned CLK_HZ   = 1_000_000,
  parameter int unsigned ON_COUNT = 999,
  parameter int unsigned F_MIN_HZ = motor_pkg::F_MIN_HZ,
  parameter int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int k = 0; k < int'(DEPTH); k++)
      mem[k] = W'(motor_pkg::off_count(CLK_HZ, ON_COUNT, F_MIN_HZ + k));
  end

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    rdata <= (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
  end

endmodule
