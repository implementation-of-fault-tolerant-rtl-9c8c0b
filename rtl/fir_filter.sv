// fir_filter: one direct-form FIR filter, y[n] = sum_l h[l] * x[n-l].
//
// The filter bank uses this block for every filter: the original filters that
// process the data inputs and the redundant filters that process the check
// inputs all share the same impulse response h, given on the coef port
// (coef[0] = h[0]). A shift register holds the previous NTAPS-1 inputs; the
// current input goes straight into the multiply-accumulate tree and the sum is
// registered, so y holds the result for the input sampled at the last rising
// clock edge (one cycle of latency, no combinational path from x to y).
//
// Arithmetic is two's complement, W bits wide everywhere: products and sums
// wrap modulo 2^W. That keeps the filter exactly linear, so a check filter fed
// with the sum of several inputs produces exactly the sum of their outputs.
// The number of taps, the output width and the wrapping are choices of this
// design; the structure (direct form, registered output) is too.
//
// fault is an XOR mask applied to the output register as it is loaded. It
// models an upset or a faulty datapath in this filter and is tied to zero in
// normal operation. rst is synchronous and active high; it clears the delay
// line and the output.
module fir_filter #(
  parameter int unsigned W     = 32,
  parameter int unsigned NTAPS = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] coef [NTAPS],
  input  logic        [W-1:0] fault,
  output logic signed [W-1:0] y
);

  // dly[l] holds x[n-1-l]
  logic signed [W-1:0] dly [NTAPS-1];
  logic signed [W-1:0] acc;

  always_comb begin
    acc = coef[0] * x;
    for (int l = 1; l < NTAPS; l++)
      acc += coef[l] * dly[l-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < NTAPS - 1; l++) dly[l] <= '0;
      y <= '0;
    end else begin
      dly[0] <= x;
      for (int l = 1; l < NTAPS - 1; l++) dly[l] <= dly[l-1];
      y <= acc ^ fault;
    end
  end

  initial assert (NTAPS >= 2) else $error("fir_filter needs at least two taps");

endmodule
