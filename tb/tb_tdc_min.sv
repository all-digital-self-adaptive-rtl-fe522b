// Self-checking testbench for tdc_min: random readings from four sensors,
// including ties and the extreme values 0 and 15, against a minimum computed
// here.
`timescale 1ps/1ps
module tb_tdc_min;
  localparam int N = 4, W = 4;
  logic [W-1:0] crs [N];
  logic [W-1:0] crs_min;
  int checks = 0, failures = 0;

  tdc_min #(.N_IN(N), .W(W)) dut (.crs, .crs_min);

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int m = 99;
      for (int i = 0; i < N; i++) begin
        crs[i] = (t < 16) ? W'(t) : W'($urandom_range(0, 15));
        if (t >= 16 && t < 40) crs[i] = (i == t % N) ? W'(t % 7) : W'(15 - t % 3);
        if (int'(crs[i]) < m) m = int'(crs[i]);
      end
      #1;
      checks++;
      if (int'(crs_min) != m) begin
        failures++;
        $display("FAIL: %0d %0d %0d %0d -> %0d expected %0d", crs[0], crs[1], crs[2], crs[3], crs_min, m);
      end
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
