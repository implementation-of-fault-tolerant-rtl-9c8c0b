// tb_output_corrector: self-checking test of output_corrector.
//
// One instance per data output of the default code. The syndrome is driven
// directly, over all eight values, with unrelated random y and z so that each
// rebuilt value is distinguishable. Expected rebuilt outputs are written out
// by hand: yc1 = z1-y2-y3, yc2 = z1-y1-y3, yc3 = z1-y1-y2, yc4 = z2-y1-y2;
// every other syndrome must pass the filter output unchanged.
`timescale 1ns/1ps
module tb_output_corrector;
  localparam int W = 32;
  int checks = 0, failures = 0;

  logic signed [W-1:0] y [4];
  logic signed [W-1:0] z [3];
  logic [2:0] syn;
  logic signed [W-1:0] yc [4];
  logic [4:0] st [4];

  for (genvar j = 0; j < 4; j++) begin : g
    output_corrector #(.W(W), .K(4), .R(3), .J(j)) dut (
      .y(y), .z(z), .syn(syn), .yc(yc[j]), .status(st[j]));
  end

  localparam logic [2:0] COL [4] = '{3'b111, 3'b110, 3'b101, 3'b011};

  initial begin
    for (int n = 0; n < 800; n++) begin
      logic signed [W-1:0] e [4];
      foreach (y[j]) y[j] = $urandom;
      foreach (z[i]) z[i] = $urandom;
      syn = n[2:0];
      #1;
      e[0] = z[0] - y[1] - y[2];
      e[1] = z[0] - y[0] - y[2];
      e[2] = z[0] - y[0] - y[1];
      e[3] = z[1] - y[0] - y[1];
      for (int j = 0; j < 4; j++) begin
        logic hit;
        hit = (syn == COL[j]);
        checks++;
        if (yc[j] !== (hit ? e[j] : y[j])) begin
          failures++; $display("FAIL out %0d syn %b", j, syn);
        end
        checks++;
        if (st[j] !== {syn != 0, hit, syn}) begin
          failures++; $display("FAIL status %0d syn %b st %b", j, syn, st[j]);
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
