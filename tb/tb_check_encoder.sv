// tb_check_encoder: self-checking test of check_encoder.
//
// The default instance (4 data inputs, 3 checks) is compared with the coding
// equations written out by hand: x1+x2+x3, x1+x2+x4, x1+x3+x4. A second
// instance with 11 data inputs and 4 checks is compared with a hand-written
// list of the code's columns (15,14,13,12,11,10,9,7,6,5,3, check 1 in the MSB).
// Now and then a fault mask is applied to one check of the default instance
// and must flip exactly the masked bits of that check only.
`timescale 1ns/1ps
module tb_check_encoder;
  localparam int W = 32;
  int checks = 0, failures = 0;

  logic signed [W-1:0] x4 [4];
  logic signed [W-1:0] c3 [3];
  logic signed [W-1:0] x11 [11];
  logic signed [W-1:0] c4 [4];
  logic [W-1:0] f3 [3];
  logic [W-1:0] f4 [4];

  check_encoder #(.W(W), .K(4), .R(3)) dut (.x(x4), .fault(f3), .xc(c3));
  check_encoder #(.W(W), .K(11), .R(4)) dut11 (.x(x11), .fault(f4), .xc(c4));

  localparam int COL11 [11] = '{15, 14, 13, 12, 11, 10, 9, 7, 6, 5, 3};

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic signed [W-1:0] e [4];
      foreach (x4[j]) x4[j] = (n < 5) ? (j + 1) * (n + 1) : $urandom;
      foreach (x11[j]) x11[j] = $urandom;
      foreach (f3[i]) f3[i] = (n % 10 == 9 && i == n % 3) ? $urandom : '0;
      foreach (f4[i]) f4[i] = '0;
      #1;
      e[0] = x4[0] + x4[1] + x4[2];
      e[1] = x4[0] + x4[1] + x4[3];
      e[2] = x4[0] + x4[2] + x4[3];
      foreach (f3[i]) e[i] ^= f3[i];
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (c3[i] !== e[i]) begin failures++; $display("FAIL k4 check %0d", i); end
      end
      for (int i = 0; i < 4; i++) begin
        e[i] = '0;
        for (int j = 0; j < 11; j++) if (COL11[j][3-i]) e[i] += x11[j];
        checks++;
        if (c4[i] !== e[i]) begin failures++; $display("FAIL k11 check %0d", i); end
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
