// Self-checking testbench for adapt_control.
// Random setpoints and worst-case readings are applied every cycle. A model
// kept here registers the setpoint and the previous length on each Capture
// and predicts L_VLRO = clamp(L_prev + SP - Crs*) and Err every cycle; it also
// checks that e_config is one cycle wide and comes CONFIG_WAIT cycles after
// Capture. Large errors drive the result into both clamp limits.
`timescale 1ps/1ps
module tb_adapt_control;
  import adapt_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] setpoint = '0, crs_min = '0;
  logic [4:0] l_vlro, l_prev;
  logic signed [4:0] err;
  logic e_config, capture;
  int checks = 0, failures = 0;

  adapt_control dut (.clk, .rst, .setpoint, .crs_min, .l_vlro, .l_prev, .err, .e_config, .capture);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    int sp_m = 0, lprev_m = L_RESET, exp_l, sum, cyc = 0, cap_cyc = -100;
    int n_lo = 0, n_hi = 0, n_cfg = 0;
    repeat (2) @(posedge clk);
    #100 rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      // Present new inputs mid-cycle.
      @(negedge clk);
      if (i % 100 < 30) begin            // drive towards the upper limit
        setpoint = 4'd15; crs_min = 4'($urandom_range(0, 3));
      end else if (i % 100 < 60) begin   // drive towards the lower limit
        setpoint = 4'($urandom_range(0, 2)); crs_min = 4'd15;
      end else begin
        setpoint = 4'($urandom_range(0, 15)); crs_min = 4'($urandom_range(0, 15));
      end
      #1;
      sum = lprev_m + sp_m - int'(crs_min);
      exp_l = (sum < L_MIN) ? L_MIN : (sum > 31) ? 31 : sum;
      check(int'(l_vlro) == exp_l, $sformatf("L_VLRO %0d expected %0d", l_vlro, exp_l));
      check(int'(err) == sp_m - int'(crs_min), "Err");
      check(int'(l_prev) == lprev_m, "L_prev");
      if (capture) cap_cyc = cyc;
      if (e_config) begin
        n_cfg++;
        check(cyc - cap_cyc == CONFIG_WAIT, "e_config CONFIG_WAIT cycles after capture");
        if (exp_l == 31 && sum > 31) n_hi++;
        if (exp_l == L_MIN && sum < L_MIN) n_lo++;
      end
      // Registers load at the coming rising edge if capture is high.
      if (capture) begin
        sp_m    = int'(setpoint);
        lprev_m = exp_l;
      end
      @(posedge clk);
      cyc++;
    end
    check(n_cfg > 50, "configs issued");
    check(n_hi > 0 && n_lo > 0, "both clamp limits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
