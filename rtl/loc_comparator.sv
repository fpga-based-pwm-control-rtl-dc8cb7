// loc_comparator: magnitude comparator of two memory locations, used as the
// start comparator (keypad location against current location: GTH1, LTH1,
// ET1) and as the stop comparator (current location against the 10 Hz
// location: GTH2, ET2).
//
// Exactly one output is high: gth when a > b, lth when a < b, et when
// a = b, as in the source's truth table.  Purely combinational.
module loc_comparator #(
  parameter int unsigned W = motor_pkg::LOC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gth,
  output logic         lth,
  output logic         et
);

  assign gth = a > b;
  assign lth = a < b;
  assign et  = a == b;

endmodule
