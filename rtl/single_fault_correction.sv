// single_fault_correction: the decoder of the filter bank.
//
// It takes the outputs of the K data filters and the R check filters and
// delivers the K corrected outputs. Each data output has its own chain: a
// syndrome_unit computes the syndrome from all filter outputs, three copies of
// output_corrector decide on and rebuild that output, and a tmr_voter merges
// the three copies bit by bit. Since one syndrome fault flips at most one
// syndrome bit, which never selects a data correction, the syndrome is not
// tripled; the correction elements, which drive the outputs, are.
//
// s[j] is the voted status of output j: {error detected, output j corrected,
// syndrome with check 1 first}, R+2 bits (5 for the default code).
//
// inj_corr[j] is an XOR mask applied to the first corrector copy of output j.
// It models a fault in a correction element and is tied to zero in normal
// operation; the voter must hide it. Purely combinational.
module single_fault_correction
  import ftf_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter int unsigned K         = 4,
  parameter int unsigned R         = 3,
  parameter int unsigned THRESHOLD = 0
) (
  input  logic signed [W-1:0] y        [K],
  input  logic signed [W-1:0] z        [R],
  input  logic        [W-1:0] inj_corr [K],
  output logic signed [W-1:0] yc       [K],
  output logic        [R+1:0] s        [K]
);

  localparam int unsigned VW = W + R + 2;

  for (genvar j = 0; j < K; j++) begin : g_out
    logic        [R-1:0] syn;
    logic signed [W-1:0] ycc [3];
    logic        [R+1:0] stc [3];
    logic        [VW-1:0] voted;

    syndrome_unit #(.W(W), .K(K), .R(R), .THRESHOLD(THRESHOLD)) u_syn (
      .y(y), .z(z), .syn(syn)
    );

    for (genvar c = 0; c < 3; c++) begin : g_copy
      output_corrector #(.W(W), .K(K), .R(R), .J(j)) u_cor (
        .y(y), .z(z), .syn(syn), .yc(ycc[c]), .status(stc[c])
      );
    end

    tmr_voter #(.W(VW)) u_vote (
      .a({stc[0], ycc[0] ^ inj_corr[j]}),
      .b({stc[1], ycc[1]}),
      .c({stc[2], ycc[2]}),
      .y(voted)
    );

    assign yc[j] = voted[W-1:0];
    assign s[j]  = voted[VW-1:W];
  end

endmodule
