// tmr_voter: bitwise two-out-of-three majority.
//
// The last correction stage of the filter bank is built three times so that
// a single fault in it cannot reach an output; this voter merges the three
// copies. Each output bit is the value held by at least two of a, b and c.
// Purely combinational.
module tmr_voter #(
  parameter int unsigned W = 37
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  assign y = (a & b) | (a & c) | (b & c);

endmodule
