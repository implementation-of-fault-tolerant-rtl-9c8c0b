// tb_prop_top: end-to-end test of the fault tolerant filter bank.
//
// Three banks are driven with the same random taps and samples:
//   u_def  - the default bank (4 data filters, 3 check filters, threshold 0),
//   u_thr  - the same bank with THRESHOLD = 64,
//   u_k11  - 11 data filters protected by 4 check filters.
// A reference model keeps the input history of every channel and computes
// the true filter outputs with 32-bit wrapping arithmetic. Faults are injected
// one at a time into the output register of a random filter (data or check)
// and, independently, into one copy of a correction element. Each cycle the
// corrected outputs must equal the true outputs of the samples taken at the
// last clock edge (one cycle of latency), and the status must name the filter
// in error. For the threshold bank, errors of magnitude 64 or less must pass
// unflagged and larger ones must be corrected.
//
// Every mechanism is counted and must happen at least once: correction of
// each data filter, detection of each check-filter error, a masked fault in a
// correction copy, an error below the threshold, a correction in the 11-filter
// bank, a reset in the middle of the stream, and faults in the encoder
// adders, which must be seen as check errors and never reach a data output.
`timescale 1ns/1ps
module tb_prop_top;
  localparam int W = 32;
  localparam int NT = 4;
  localparam int T = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [W-1:0] t [NT];
  logic signed [W-1:0] x [11];
  logic signed [W-1:0] x4 [4];
  logic [W-1:0] inj7 [7];
  logic [W-1:0] inj15 [15];
  logic [W-1:0] enc3 [3];
  logic [W-1:0] enc4 [4];
  logic [W-1:0] injc4 [4];
  logic [W-1:0] injc11 [11];
  logic signed [W-1:0] yc_d [4], yc_t [4], yc_11 [11];
  logic [4:0] s_d [4], s_t [4];
  logic [5:0] s_11 [11];

  always_comb foreach (x4[j]) x4[j] = x[j];

  prop_top u_def (.clk(clk), .rst(rst), .t(t), .x(x4), .inj_filt(inj7), .inj_enc(enc3),
                  .inj_corr(injc4), .yc(yc_d), .s(s_d));
  prop_top #(.THRESHOLD(T)) u_thr (.clk(clk), .rst(rst), .t(t), .x(x4), .inj_filt(inj7), .inj_enc(enc3),
                  .inj_corr(injc4), .yc(yc_t), .s(s_t));
  prop_top #(.K(11), .R(4)) u_k11 (.clk(clk), .rst(rst), .t(t), .x(x), .inj_filt(inj15), .inj_enc(enc4),
                  .inj_corr(injc11), .yc(yc_11), .s(s_11));

  // syndromes written out by hand: data filters, then check filters
  localparam logic [2:0] SYN3 [7] = '{3'b111, 3'b110, 3'b101, 3'b011, 3'b100, 3'b010, 3'b001};
  localparam logic [3:0] SYN4 [15] = '{4'hF, 4'hE, 4'hD, 4'hC, 4'hB, 4'hA, 4'h9, 4'h7,
                                       4'h6, 4'h5, 4'h3, 4'h8, 4'h4, 4'h2, 4'h1};

  logic signed [W-1:0] hist [11][NT];
  int n_corr [4], n_chk [3], n_tmr, n_small, n_big, n_k11, n_rst, n_clean, n_enc, n_enc_seen;

  function automatic logic signed [W-1:0] golden(input int ch);
    logic signed [W-1:0] a = '0;
    for (int l = 0; l < NT; l++) a += t[l] * hist[ch][l];
    return a;
  endfunction

  task automatic clear_hist();
    for (int c = 0; c < 11; c++) for (int l = 0; l < NT; l++) hist[c][l] = '0;
  endtask

  task automatic cycle(input int n);
    int pos, pos11;
    logic [W-1:0] m;
    logic is_small;
    // drive at the falling edge
    @(negedge clk);
    foreach (x[c]) x[c] = $urandom;
    foreach (inj7[f]) inj7[f] = '0;
    foreach (inj15[f]) inj15[f] = '0;
    foreach (injc4[j]) injc4[j] = '0;
    foreach (injc11[j]) injc11[j] = '0;
    pos = (n % 3 == 0) ? 7 : $urandom_range(6, 0);   // 7: no fault
    is_small = (n % 5 == 1);
    m = is_small ? (W'(1) << $urandom_range(5, 0)) : ((W'($urandom) & 32'hFFFF_0000) | 32'h0001_0000);
    if (pos < 7) inj7[pos] = m;
    pos11 = (n % 4 == 0) ? 15 : $urandom_range(14, 0);
    if (pos11 < 15) inj15[pos11] = $urandom | 1;
    if (n % 7 == 3) begin
      int j = $urandom_range(3, 0);
      injc4[j] = $urandom | 1;
      injc11[$urandom_range(10, 0)] = $urandom | 1;
      n_tmr++;
    end
    @(posedge clk);
    for (int c = 0; c < 11; c++) begin
      for (int l = NT - 1; l > 0; l--) hist[c][l] = hist[c][l-1];
      hist[c][0] = x[c];
    end
    #1;
    // default bank: every output corrected, status names the filter
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (yc_d[j] !== golden(j)) begin
        failures++; $display("FAIL def n=%0d pos=%0d out=%0d", n, pos, j);
      end
      checks++;
      if (s_d[j] !== {pos < 7, pos == j, pos < 7 ? SYN3[pos] : 3'b000}) begin
        failures++; $display("FAIL def status n=%0d pos=%0d out=%0d s=%b", n, pos, j, s_d[j]);
      end
    end
    if (pos < 4) n_corr[pos]++;
    else if (pos < 7) n_chk[pos-4]++;
    else n_clean++;
    // threshold bank
    for (int j = 0; j < 4; j++) begin
      logic signed [W-1:0] e;
      logic signed [W-1:0] want;
      logic [W-1:0] mag;
      e = (pos == j) ? ((golden(j) ^ m) - golden(j)) : '0;
      if (pos < 7 && pos >= 4) e = '0;
      mag = e[W-1] ? -e : e;
      want = (pos == j && mag <= T) ? golden(j) ^ m : golden(j);
      checks++;
      if (yc_t[j] !== want) begin
        failures++; $display("FAIL thr n=%0d pos=%0d out=%0d", n, pos, j);
      end
    end
    if (pos < 7) begin
      if (is_small) begin
        n_small++;
        checks++;
        if (s_t[0][4] !== 1'b0) begin failures++; $display("FAIL thr flagged is_small error n=%0d", n); end
      end else begin
        n_big++;
        checks++;
        if (s_t[0][2:0] !== SYN3[pos]) begin failures++; $display("FAIL thr syndrome n=%0d", n); end
      end
    end
    // 11-filter bank
    for (int j = 0; j < 11; j++) begin
      checks++;
      if (yc_11[j] !== golden(j)) begin
        failures++; $display("FAIL k11 n=%0d pos=%0d out=%0d", n, pos11, j);
      end
      checks++;
      if (s_11[j][3:0] !== (pos11 < 15 ? SYN4[pos11] : 4'h0) || s_11[j][4] !== (pos11 == j)) begin
        failures++; $display("FAIL k11 status n=%0d pos=%0d out=%0d", n, pos11, j);
      end
    end
    if (pos11 < 11) n_k11++;
  endtask

  initial begin
    foreach (x[c]) x[c] = '0;
    foreach (inj7[f]) inj7[f] = '0;
    foreach (inj15[f]) inj15[f] = '0;
    foreach (injc4[j]) injc4[j] = '0;
    foreach (injc11[j]) injc11[j] = '0;
    foreach (enc3[i]) enc3[i] = '0;
    foreach (enc4[i]) enc4[i] = '0;
    foreach (t[l]) t[l] = $urandom;
    clear_hist();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 400; n++) begin
      if (n == 200) begin
        // reset in the middle of the stream clears every filter
        @(negedge clk) begin rst = 1; foreach (x[c]) x[c] = '0; end
        @(posedge clk); #1;
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (yc_d[j] !== 0 || s_d[j] !== 0) begin failures++; $display("FAIL reset"); end
        end
        clear_hist();
        @(negedge clk) rst = 0;
        n_rst++;
        foreach (t[l]) t[l] = $signed($urandom_range(255, 0)) - 128;
      end
      cycle(n);
    end
    // encoder faults: a corrupted check input spoils one check filter for
    // NTAPS cycles; data outputs must stay right and never be "corrected"
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      foreach (x[c]) x[c] = $urandom;
      foreach (enc3[i]) enc3[i] = '0;
      if (n % 6 == 0) begin enc3[(n / 6) % 3] = $urandom | 1; n_enc++; end
      @(posedge clk);
      for (int c = 0; c < 11; c++) begin
        for (int l = NT - 1; l > 0; l--) hist[c][l] = hist[c][l-1];
        hist[c][0] = x[c];
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (yc_d[j] !== golden(j) || s_d[j][3] !== 1'b0) begin
          failures++; $display("FAIL encoder fault reached output %0d, n=%0d", j, n);
        end
        checks++;
        if ($countones(s_d[j][2:0]) > 1) begin
          failures++; $display("FAIL encoder fault set several syndrome bits, n=%0d", n);
        end
      end
      if (s_d[0][4]) n_enc_seen++;
    end
    @(negedge clk) foreach (enc3[i]) enc3[i] = '0;
    for (int j = 0; j < 4; j++) begin
      $display("data filter %0d corrected %0d times", j + 1, n_corr[j]);
      checks++; if (n_corr[j] == 0) begin failures++; $display("FAIL never corrected %0d", j); end
    end
    for (int i = 0; i < 3; i++) begin
      $display("check filter %0d error seen %0d times", i + 1, n_chk[i]);
      checks++; if (n_chk[i] == 0) begin failures++; $display("FAIL check %0d never hit", i); end
    end
    $display("fault-free %0d, corrector-copy faults %0d, below threshold %0d, above %0d, k11 corrections %0d, resets %0d",
             n_clean, n_tmr, n_small, n_big, n_k11, n_rst);
    checks++; if (n_clean == 0) failures++;
    checks++; if (n_tmr == 0) failures++;
    checks++; if (n_small == 0) failures++;
    checks++; if (n_big == 0) failures++;
    checks++; if (n_k11 == 0) failures++;
    checks++; if (n_rst == 0) failures++;
    $display("encoder faults %0d, cycles with a check error from them %0d", n_enc, n_enc_seen);
    checks++; if (n_enc == 0 || n_enc_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
