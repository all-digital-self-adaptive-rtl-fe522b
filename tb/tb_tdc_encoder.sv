// Self-checking testbench for tdc_encoder.
// Every clean thermometer code of the 15-stage line must give the number of
// set taps; random codes (bubbles, remnants of an earlier pulse) must give
// the length of the run of ones starting at tap 0, computed here.
`timescale 1ps/1ps
module tb_tdc_encoder;
  localparam int N = 15;
  logic [N-1:0] tap;
  logic [3:0]   crs;
  int checks = 0, failures = 0;

  tdc_encoder #(.N(N)) dut (.tap, .crs);

  task automatic check(input int exp_v);
    #1;
    checks++;
    if (int'(crs) != exp_v) begin
      failures++;
      $display("FAIL: tap=%b crs=%0d expected %0d", tap, crs, exp_v);
    end
  endtask

  initial begin
    for (int c = 0; c <= N; c++) begin
      tap = '0;
      for (int i = 0; i < c; i++) tap[i] = 1'b1;
      check(c);
    end
    for (int c = 0; c < N; c++) begin
      int ones;
      tap = '1;
      tap[c] = 1'b0;
      ones = c;
      check(ones);
    end
    repeat (200) begin
      int ones;
      tap = N'($urandom);
      ones = 0;
      while (ones < N && tap[ones]) ones++;
      check(ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
