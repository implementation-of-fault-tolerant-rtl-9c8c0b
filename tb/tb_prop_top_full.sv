// tb_prop_top_full: the filter bank at its default size (4 data filters,
// 3 check filters, 32-bit samples, 4 taps, threshold 0) filtering a long
// stream. Samples and taps are random; a fault is injected into one of the
// seven filter output registers in most cycles, and into a correction copy in
// some. A reference model computes the true outputs; every corrected output
// and status word is compared each cycle, one clock after its samples were
// taken. Each data-filter correction and check-filter detection must happen.
`timescale 1ns/1ps
module tb_prop_top_full;
  localparam int W = 32;
  localparam int NT = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [W-1:0] t [NT];
  logic signed [W-1:0] x [4];
  logic [W-1:0] inj_filt [7];
  logic [W-1:0] inj_enc [3];
  logic [W-1:0] inj_corr [4];
  logic signed [W-1:0] yc [4];
  logic [4:0] s [4];

  prop_top dut (.*);

  localparam logic [2:0] SYN [8] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                     3'b100, 3'b010, 3'b001, 3'b000};

  logic signed [W-1:0] hist [4][NT];
  int hits [8];
  int n_tmr = 0;

  function automatic logic signed [W-1:0] golden(input int ch);
    logic signed [W-1:0] a = '0;
    for (int l = 0; l < NT; l++) a += t[l] * hist[ch][l];
    return a;
  endfunction

  initial begin
    foreach (x[c]) x[c] = '0;
    foreach (inj_filt[f]) inj_filt[f] = '0;
    foreach (inj_corr[j]) inj_corr[j] = '0;
    foreach (inj_enc[i]) inj_enc[i] = '0;
    foreach (t[l]) t[l] = $urandom;
    foreach (hist[c, l]) hist[c][l] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 20000; n++) begin
      int pos;
      @(negedge clk);
      foreach (x[c]) x[c] = $urandom;
      foreach (inj_filt[f]) inj_filt[f] = '0;
      foreach (inj_corr[j]) inj_corr[j] = '0;
      pos = $urandom_range(7, 0);
      if (pos < 7) inj_filt[pos] = $urandom | 1;
      if (n % 5 == 2) begin inj_corr[$urandom_range(3, 0)] = $urandom | 1; n_tmr++; end
      @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        for (int l = NT - 1; l > 0; l--) hist[c][l] = hist[c][l-1];
        hist[c][0] = x[c];
      end
      #1;
      hits[pos]++;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (yc[j] !== golden(j)) begin failures++; $display("FAIL n=%0d pos=%0d out=%0d", n, pos, j); end
        checks++;
        if (s[j] !== {pos < 7, pos == j, SYN[pos]}) begin
          failures++; $display("FAIL status n=%0d pos=%0d out=%0d s=%b", n, pos, j, s[j]);
        end
      end
    end
    for (int p = 0; p < 8; p++) begin
      $display("fault position %0d (0-3 data, 4-6 check, 7 none): %0d cycles", p, hits[p]);
      checks++; if (hits[p] == 0) failures++;
    end
    $display("correction-copy faults masked: %0d", n_tmr);
    checks++; if (n_tmr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
