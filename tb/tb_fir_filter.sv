// tb_fir_filter: self-checking test of fir_filter.
//
// Random taps and samples are driven; a reference model in the testbench
// keeps its own history of inputs and computes y[n] = sum h[l] x[n-l] with
// 32-bit wrapping arithmetic. The output is compared one clock after each
// input is sampled (the filter's latency). It also checks that reset clears
// the delay line, that a fault mask flips exactly the masked output bits for
// one cycle, and a known impulse response.
`timescale 1ns/1ps
module tb_fir_filter;
  localparam int W = 32;
  localparam int NTAPS = 4;

  logic clk = 0, rst = 1;
  logic signed [W-1:0] x = '0;
  logic signed [W-1:0] coef [NTAPS];
  logic [W-1:0] fault = '0;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  fir_filter #(.W(W), .NTAPS(NTAPS)) dut (.*);

  always #5 clk = ~clk;

  logic signed [W-1:0] hist [NTAPS];   // hist[l] = x[n-l]

  function automatic logic signed [W-1:0] ref_y();
    logic signed [W-1:0] a = '0;
    for (int l = 0; l < NTAPS; l++) a += coef[l] * hist[l];
    return a;
  endfunction

  task automatic step(input logic signed [W-1:0] xin, input logic [W-1:0] f);
    @(negedge clk);
    x = xin; fault = f;
    @(posedge clk);
    for (int l = NTAPS - 1; l > 0; l--) hist[l] = hist[l-1];
    hist[0] = xin;
    #1;
    checks++;
    if (y !== (ref_y() ^ f)) begin
      failures++;
      $display("FAIL y=%h expected %h f=%h", y, ref_y() ^ f, f);
    end
  endtask

  initial begin
    for (int l = 0; l < NTAPS; l++) begin coef[l] = l + 1; hist[l] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // impulse response: y must read back the taps 1,2,3,4 then 0
    step(1, '0);
    for (int l = 1; l <= NTAPS; l++) begin
      checks++;
      if (y !== l) begin failures++; $display("FAIL impulse tap %0d: %0d", l, y); end
      step(0, '0);
    end
    checks++;
    if (y !== 0) begin failures++; $display("FAIL impulse tail %0d", y); end
    // random taps and samples, occasional faults
    for (int l = 0; l < NTAPS; l++) coef[l] = $urandom;
    for (int n = 0; n < 300; n++)
      step($urandom, (n % 17 == 5) ? (W'(1) << (n % W)) | W'($urandom) : '0);
    // reset clears everything
    @(negedge clk) begin rst = 1; x = 0; fault = 0; end
    @(posedge clk); #1;
    checks++;
    if (y !== 0) begin failures++; $display("FAIL reset y=%0d", y); end
    for (int l = 0; l < NTAPS; l++) hist[l] = '0;
    @(negedge clk) rst = 0;
    for (int n = 0; n < 20; n++) step($urandom, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
