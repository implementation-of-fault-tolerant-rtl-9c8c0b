// output_corrector: repairs one data output of the filter bank.
//
// Instance J serves data output J (0-based). When the syndrome equals the
// column of filter J (ftf_pkg), that filter is the one in error and its output
// is rebuilt from the first check that covers it: the check filter output
// minus the other data outputs of that check. For filter 1 of the default code
// that is yc1 = z1 - y2 - y3. Any other syndrome passes y[J] unchanged, so an
// error in a check filter or in another data filter leaves this output alone.
//
// status reports, MSB first: error detected (syndrome not zero), this output
// corrected, and the syndrome itself (check 1 first). Purely combinational.
module output_corrector
  import ftf_pkg::*;
#(
  parameter int unsigned W = 32,
  parameter int unsigned K = 4,
  parameter int unsigned R = 3,
  parameter int unsigned J = 0
) (
  input  logic signed [W-1:0] y      [K],
  input  logic signed [W-1:0] z      [R],
  input  logic        [R-1:0] syn,
  output logic signed [W-1:0] yc,
  output logic        [R+1:0] status
);

  localparam logic [R-1:0] COL = R'(code_column(R, J));
  localparam int unsigned  CHK = first_check(R, J);

  logic               hit;
  logic signed [W-1:0] rebuilt;

  always_comb begin
    rebuilt = z[CHK];
    for (int m = 0; m < K; m++)
      if (m != J && check_has(R, CHK, m)) rebuilt -= y[m];
  end

  assign hit    = (syn == COL);
  assign yc     = hit ? rebuilt : y[J];
  assign status = {|syn, hit, syn};

endmodule
