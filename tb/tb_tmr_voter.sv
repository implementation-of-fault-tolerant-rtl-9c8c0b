// tb_tmr_voter: self-checking test of tmr_voter. Each output bit is compared
// with a count of how many inputs hold a one in that position; cases with
// one input differing from the other two are forced as well as random ones.
`timescale 1ns/1ps
module tb_tmr_voter;
  localparam int W = 37;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, c, y;

  tmr_voter #(.W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] e;
      a = {$urandom, $urandom};
      case (n % 4)
        0: begin b = a; c = {$urandom, $urandom}; end
        1: begin c = a; b = {$urandom, $urandom}; end
        2: begin b = {$urandom, $urandom}; c = b; end
        default: begin b = {$urandom, $urandom}; c = {$urandom, $urandom}; end
      endcase
      #1;
      for (int i = 0; i < W; i++) e[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      checks++;
      if (y !== e) begin failures++; $display("FAIL %h %h %h -> %h", a, b, c, y); end
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
