// check_encoder: the coding block that forms the inputs of the check filters.
//
// Check input i is the sum of the data inputs that check i covers (see
// ftf_pkg). For the default code: xc[0] = x1+x2+x3, xc[1] = x1+x2+x4,
// xc[2] = x1+x3+x4. Each check sum has adders of its own, with no partial sum
// shared between checks, so a fault in one adder corrupts only one check and
// the corrector treats it as a check-filter error instead of miscorrecting a
// data output. Sums wrap modulo 2^W, matching the filters. Purely
// combinational.
//
// fault[i] is an XOR mask on check input i. It models a fault in that sum's
// adders and is tied to zero in normal operation.
module check_encoder
  import ftf_pkg::*;
#(
  parameter int unsigned W = 32,
  parameter int unsigned K = 4,
  parameter int unsigned R = 3
) (
  input  logic signed [W-1:0] x     [K],
  input  logic        [W-1:0] fault [R],
  output logic signed [W-1:0] xc [R]
);

  for (genvar i = 0; i < R; i++) begin : g_chk
    logic signed [W-1:0] sum;
    always_comb begin
      sum = '0;
      for (int j = 0; j < K; j++)
        if (check_has(R, i, j)) sum += x[j];
    end
    assign xc[i] = sum ^ fault[i];
  end

endmodule
