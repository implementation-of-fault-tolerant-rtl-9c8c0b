// tb_single_fault_correction: self-checking test of the decoder.
//
// Consistent filter outputs are built from random true values, one of the
// seven outputs (or none) is corrupted, and now and then one copy of a
// correction element is corrupted as well. Every corrected output must equal
// its true value, and the status must report the detection, the correction
// of the right output only, and the syndrome of the hand-written table.
`timescale 1ns/1ps
module tb_single_fault_correction;
  localparam int W = 32;
  int checks = 0, failures = 0;

  logic signed [W-1:0] y [4];
  logic signed [W-1:0] z [3];
  logic [W-1:0] inj_corr [4];
  logic signed [W-1:0] yc [4];
  logic [4:0] s [4];

  single_fault_correction #(.W(W), .K(4), .R(3)) dut (.*);

  localparam logic [2:0] TABLE [8] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b001, 3'b000};

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic signed [W-1:0] tv [4];
      logic signed [W-1:0] e;
      int pos;
      foreach (tv[j]) tv[j] = $urandom;
      foreach (y[j]) y[j] = tv[j];
      z[0] = tv[0] + tv[1] + tv[2];
      z[1] = tv[0] + tv[1] + tv[3];
      z[2] = tv[0] + tv[2] + tv[3];
      pos = n % 8;
      e = $urandom | 1;
      if (pos < 4) y[pos] ^= e; else if (pos < 7) z[pos-4] ^= e;
      foreach (inj_corr[j]) inj_corr[j] = ((n / 8) % 3 == 1) ? $urandom : '0;
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (yc[j] !== tv[j]) begin
          failures++; $display("FAIL n %0d pos %0d out %0d", n, pos, j);
        end
        checks++;
        if (s[j] !== {pos != 7, pos == j, TABLE[pos]}) begin
          failures++; $display("FAIL status n %0d pos %0d out %0d: %b", n, pos, j, s[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
