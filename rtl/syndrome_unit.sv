// syndrome_unit: detects and locates a wrong filter output.
//
// For every check i it forms the residue d_i = z_i - (sum of the data outputs
// y_j that check i covers), which is zero when all filters are right because
// the filters are linear. A residue whose magnitude exceeds THRESHOLD sets the
// syndrome bit of that check; smaller residues count as zero, so an error
// that small is neither flagged nor corrected. With the wrapping integer
// arithmetic of this design the residues of a fault-free bank are exactly
// zero, so THRESHOLD defaults to 0 (any difference is an error); a larger
// value is for filter implementations whose check and data paths round
// differently.
//
// The syndrome has check 1 in its MSB, so its value is the column (in
// ftf_pkg) of the data filter in error, a single set bit for a check filter
// in error, and zero without error. Every residue has adders of its own, so a
// fault inside this block flips at most one syndrome bit, and a single-bit
// syndrome never leads to a data correction. Purely combinational.
module syndrome_unit
  import ftf_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter int unsigned K         = 4,
  parameter int unsigned R         = 3,
  parameter int unsigned THRESHOLD = 0
) (
  input  logic signed [W-1:0] y   [K],
  input  logic signed [W-1:0] z   [R],
  output logic        [R-1:0] syn
);

  localparam logic [W-1:0] THR = W'(THRESHOLD);

  for (genvar i = 0; i < R; i++) begin : g_chk
    logic signed [W-1:0] res;
    logic        [W-1:0] mag;
    always_comb begin
      res = z[i];
      for (int j = 0; j < K; j++)
        if (check_has(R, i, j)) res -= y[j];
      mag = res[W-1] ? -res : res;
    end
    assign syn[R-1-i] = mag > THR;
  end

endmodule
