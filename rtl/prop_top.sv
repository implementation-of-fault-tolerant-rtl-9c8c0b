// prop_top: fault tolerant bank of K parallel FIR filters protected by an
// arithmetic error-correcting code.
//
// Idea: K filters that share one impulse response h but filter different
// inputs are linear, so filtering a sum of inputs gives the sum of their
// outputs. The coding block (check_encoder) forms R check inputs as sums of
// the data inputs, R redundant filters filter them, and the decoder
// (single_fault_correction) compares each check filter output with the sum of
// the matching data filter outputs. The pattern of failing checks locates a
// single faulty filter, and a faulty data output is rebuilt from a check
// output minus the other data outputs. With the default Hamming(7,4) code,
// four filters are protected by three redundant ones:
//   check 1: x1+x2+x3   check 2: x1+x2+x4   check 3: x1+x3+x4
//
// Interface: x[j] is the sample of channel j+1 (x1..x4), t[l] the tap h[l]
// shared by all filters (t1..t4), yc[j] the corrected output of channel j+1
// and s[j] its status: {error detected, channel corrected, syndrome s1 s2 s3}.
// Timing: every filter registers its output, so yc and s reflect the inputs
// sampled at the last rising edge of clk; the encoder is ahead of the
// registers and the decoder after them. rst is synchronous and active high.
//
// inj_filt[f] (f < K: data filter f+1, f >= K: check filter f-K+1),
// inj_enc[i] and inj_corr[j] are XOR masks that inject faults into a filter
// output register, into the adders of check input i+1, and into one copy of
// a correction element. They exist to test the
// protection and are tied to zero in operation.
//
// The four filters, three check filters, the coding equations, the syndrome
// table, the correction rule and the threshold follow the proposal; the tap
// count, 32-bit wrapping arithmetic, the status encoding, the registering and
// the fault-injection ports are this design's choices.
module prop_top
  import ftf_pkg::*;
#(
  parameter int unsigned K         = 4,
  parameter int unsigned R         = 3,
  parameter int unsigned W         = 32,
  parameter int unsigned NTAPS     = 4,
  parameter int unsigned THRESHOLD = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] t        [NTAPS],
  input  logic signed [W-1:0] x        [K],
  input  logic        [W-1:0] inj_filt [K+R],
  input  logic        [W-1:0] inj_enc  [R],
  input  logic        [W-1:0] inj_corr [K],
  output logic signed [W-1:0] yc       [K],
  output logic        [R+1:0] s        [K]
);

  logic signed [W-1:0] xc [R];
  logic signed [W-1:0] y  [K];
  logic signed [W-1:0] z  [R];

  check_encoder #(.W(W), .K(K), .R(R)) u_coding (.x(x), .fault(inj_enc), .xc(xc));

  for (genvar j = 0; j < K; j++) begin : g_orig
    fir_filter #(.W(W), .NTAPS(NTAPS)) u_fir (
      .clk(clk), .rst(rst), .x(x[j]), .coef(t), .fault(inj_filt[j]), .y(y[j])
    );
  end

  for (genvar i = 0; i < R; i++) begin : g_red
    fir_filter #(.W(W), .NTAPS(NTAPS)) u_fir (
      .clk(clk), .rst(rst), .x(xc[i]), .coef(t), .fault(inj_filt[K+i]), .y(z[i])
    );
  end

  single_fault_correction #(.W(W), .K(K), .R(R), .THRESHOLD(THRESHOLD)) u_sfc (
    .y(y), .z(z), .inj_corr(inj_corr), .yc(yc), .s(s)
  );

  initial assert (K >= 1 && K <= max_data(R))
    else $error("prop_top: R check filters protect at most 2^R-1-R data filters");

endmodule
