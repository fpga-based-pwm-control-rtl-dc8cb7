// freq_decoder: maps a supply frequency (binary hertz) to the location of its
// OFF count in off_time_mem.
//
// Location = frequency - F_MIN_HZ; valid is low for a frequency outside
// F_MIN_HZ..F_MAX_HZ, and the location is then forced to the lowest entry.
// Purely combinational.  A decoder from keypad frequency to memory address is
// from the source; the linear 1 Hz per location mapping is this design's.
module freq_decoder #(
  parameter int unsigned FREQ_W   = motor_pkg::FREQ_W,
  parameter int unsigned LOC_W    = motor_pkg::LOC_W,
  parameter int unsigned F_MIN_HZ = motor_pkg::F_MIN_HZ,
  parameter int unsigned F_MAX_HZ = motor_pkg::F_MAX_HZ
) (
  input  logic [FREQ_W-1:0] freq,
  output logic [LOC_W-1:0]  loc,
  output logic              valid
);

  assign valid = (freq >= FREQ_W'(F_MIN_HZ)) && (freq <= FREQ_W'(F_MAX_HZ));
  assign loc   = valid ? LOC_W'(freq - FREQ_W'(F_MIN_HZ)) : '0;

endmodule
