// tb_syndrome_unit: self-checking test of syndrome_unit.
//
// Random consistent filter outputs are built (each check equal to the sum of
// its data outputs), then an error is added to one of the seven outputs. The
// expected syndromes are the hand-written error location table:
// y1 111, y2 110, y3 101, y4 011, z1 100, z2 010, z3 001, none 000.
// A second instance with THRESHOLD = 8 must ignore errors of magnitude 8 or
// less and flag larger ones.
`timescale 1ns/1ps
module tb_syndrome_unit;
  localparam int W = 32;
  localparam int T = 8;
  int checks = 0, failures = 0;

  logic signed [W-1:0] y [4];
  logic signed [W-1:0] z [3];
  logic [2:0] syn, syn_t;

  syndrome_unit #(.W(W), .K(4), .R(3)) dut (.y(y), .z(z), .syn(syn));
  syndrome_unit #(.W(W), .K(4), .R(3), .THRESHOLD(T)) dut_t (.y(y), .z(z), .syn(syn_t));

  localparam logic [2:0] TABLE [8] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b001, 3'b000};

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int pos;
      logic signed [W-1:0] e;
      logic [W-1:0] mag;
      foreach (y[j]) y[j] = $urandom;
      z[0] = y[0] + y[1] + y[2];
      z[1] = y[0] + y[1] + y[3];
      z[2] = y[0] + y[2] + y[3];
      pos = n % 8;
      case ((n / 8) % 3)
        0: e = $urandom;
        1: e = $signed($urandom_range(2 * T + 2, 0)) - (T + 1);   // near threshold
        default: e = (n & 16) ? 32'sh8000_0000 : -1;
      endcase
      if (pos == 7) e = 0;
      if (pos < 4) y[pos] += e; else if (pos < 7) z[pos-4] += e;
      #1;
      mag = e[W-1] ? -e : e;
      checks++;
      if (syn !== (e != 0 ? TABLE[pos] : 3'b000)) begin
        failures++; $display("FAIL pos %0d e %0d syn %b", pos, e, syn);
      end
      checks++;
      if (syn_t !== (mag > T ? TABLE[pos] : 3'b000)) begin
        failures++; $display("FAIL thr pos %0d e %0d syn %b", pos, e, syn_t);
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
