// Workload testbench: uniform (die-wide) slowdown.
// Two copies of the clock generator with the default sensors; in the second
// every gate, in the sensors and in the ring alike, is 25 % slower, as a lower
// supply voltage or a higher temperature would make it. Because the ring is
// built from the same kind of gates, the loop must settle on the same ring
// length and deliver a clock exactly 25 % slower: the period follows the
// slowdown without the loop having to act. Checked at several setpoints,
// including an abrupt 1 -> 14 step.
`timescale 1ps/1ps
module tb_uniform_slowdown;
  import adapt_pkg::*;
  localparam int HOLD = 8;
  localparam int GATE [2] = '{300, 375};
  localparam int STG  [2] = '{1052, 1315};

  logic rst = 1'b1;
  logic [3:0] setpoint = 4'd7;
  logic [1:0] clk_global, clk_vlro, e_config, capture;
  logic [3:0] crs [2][4];
  logic [3:0] crs_min [2];
  logic [4:0] l_vlro [2], l_active [2];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    adaptive_clock_system #(.GATE_PS(GATE[c]), .STAGE_PS(STG[c])) dut (
      .rst, .setpoint, .clk_global(clk_global[c]), .clk_vlro(clk_vlro[c]),
      .crs(crs[c]), .crs_min(crs_min[c]), .l_vlro(l_vlro[c]), .l_active(l_active[c]),
      .e_config(e_config[c]), .capture(capture[c]));
    bufg_model #(.DELAY_PS(1500)) u_bufg (.i(clk_vlro[c]), .o(clk_global[c]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic wait_rounds(input int c, input int n);
    repeat (n) @(posedge clk_global[c] iff capture[c]);
  endtask

  task automatic measure(input int c, output longint per);
    longint t0;
    @(posedge clk_vlro[c]); t0 = $time;
    @(posedge clk_vlro[c]); per = $time - t0;
  endtask

  initial begin
    int sps [6] = '{7, 1, 14, 3, 10, 12};
    longint p0, p1;
    #20_000 rst = 1'b0;
    foreach (sps[i]) begin
      setpoint = 4'(sps[i]);
      fork
        wait_rounds(0, HOLD);
        wait_rounds(1, HOLD);
      join
      #1;
      check(l_active[0] == l_active[1],
            $sformatf("SP %0d: lengths %0d and %0d differ", sps[i], l_active[0], l_active[1]));
      check(crs_min[0] == crs_min[1], $sformatf("SP %0d: worst readings differ", sps[i]));
      measure(0, p0);
      measure(1, p1);
      check(p1 * 4 == p0 * 5,
            $sformatf("SP %0d: periods %0d and %0d not in 1.25 ratio", sps[i], p0, p1));
      $display("SP %0d: L=%0d, period %0d ps nominal, %0d ps slow", sps[i], l_active[0], p0, p1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
