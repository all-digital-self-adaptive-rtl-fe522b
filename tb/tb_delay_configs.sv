// Workload testbench: three copies of the clock generator, each with all four
// sensors built alike but with different gate counts (stage/offset of 8/16,
// 9/18 and 10/20 gates), run side by side through the setpoint pattern
// 14 -> 1, 14, 1, 14, 1, 1 -> 14. Longer sensor delay lines stand for a
// slower die: for the same setpoint the loop must produce a clock period no
// shorter than for faster sensors, and in every configuration the settled
// period must grow with the setpoint (a near-linear frequency-selection
// curve). Checked at the end of each setpoint hold; also checks that every
// configuration reaches or brackets each setpoint. Limit cycles (the worst
// reading alternating around an unreachable setpoint) are counted and
// reported.
`timescale 1ps/1ps
module tb_delay_configs;
  import adapt_pkg::*;
  localparam int STAGE = 1052, HOLD = 10;
  localparam int OFF [3] = '{16, 18, 20};
  localparam int STG [3] = '{8, 9, 10};

  logic rst = 1'b1;
  logic [3:0] setpoint = 4'd14;
  logic [2:0] clk_global, clk_vlro, e_config, capture;
  logic [3:0] crs [3][4];
  logic [3:0] crs_min [3];
  logic [4:0] l_vlro [3], l_active [3];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    adaptive_clock_system #(
      .OFFSET_GATES('{OFF[c], OFF[c], OFF[c], OFF[c]}),
      .STAGE_GATES ('{STG[c], STG[c], STG[c], STG[c]})
    ) dut (
      .rst, .setpoint, .clk_global(clk_global[c]), .clk_vlro(clk_vlro[c]),
      .crs(crs[c]), .crs_min(crs_min[c]), .l_vlro(l_vlro[c]), .l_active(l_active[c]),
      .e_config(e_config[c]), .capture(capture[c]));
    bufg_model #(.DELAY_PS(1500)) u_bufg (.i(clk_vlro[c]), .o(clk_global[c]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  int settled [3][16];
  int n_cycle = 0;

  // Collects the worst readings of one configuration over the last rounds.
  task automatic run_hold(input int c, input int sp, output int l_end, output bit ok, output bit cyc);
    automatic bit hit = 0, below = 0, above = 0;
    for (int r = 0; r < HOLD; r++) begin
      @(posedge clk_global[c] iff capture[c]);
      #1;
      if (r >= HOLD - 4) begin
        if (int'(crs_min[c]) == sp) hit = 1;
        if (int'(crs_min[c]) < sp) below = 1;
        if (int'(crs_min[c]) > sp) above = 1;
      end
    end
    l_end = int'(l_active[c]);
    ok  = hit || (below && above);
    cyc = !hit && below && above;
  endtask

  initial begin
    int pattern [$];
    for (int s = 14; s >= 1; s--) pattern.push_back(s);
    pattern.push_back(14); pattern.push_back(1); pattern.push_back(14); pattern.push_back(1);
    for (int s = 2; s <= 14; s++) pattern.push_back(s);

    #20_000 rst = 1'b0;
    foreach (pattern[p]) begin
      int le [3];
      bit ok [3], cy [3];
      setpoint = 4'(pattern[p]);
      fork
        run_hold(0, pattern[p], le[0], ok[0], cy[0]);
        run_hold(1, pattern[p], le[1], ok[1], cy[1]);
        run_hold(2, pattern[p], le[2], ok[2], cy[2]);
      join
      for (int c = 0; c < 3; c++) begin
        check(ok[c], $sformatf("config %0d: setpoint %0d not reached", c, pattern[p]));
        if (cy[c]) n_cycle++;
        settled[c][pattern[p]] = le[c];
      end
      // Slower sensors never give a shorter clock (one step of slack for a
      // limit cycle caught at a different phase).
      check(le[1] >= le[0] - 1 && le[2] >= le[1] - 1,
            $sformatf("SP %0d: lengths %0d %0d %0d not ordered", pattern[p], le[0], le[1], le[2]));
    end
    for (int c = 0; c < 3; c++) begin
      for (int s = 2; s <= 14; s++)
        check(settled[c][s] >= settled[c][s-1] - 1, $sformatf("config %0d: period falls at SP %0d", c, s));
      check(settled[c][14] > settled[c][1], "period grows over the setpoint range");
      $display("config %0d (stage %0d, offset %0d): period ns at SP 1..14 =", c, STG[c], OFF[c]);
      for (int s = 1; s <= 14; s++) $write(" %0.1f", 2.0 * (settled[c][s] + 1) * STAGE / 1000.0);
      $write("\n");
    end
    // The slowest configuration settles on a longer period at the top setpoint.
    check(settled[2][14] > settled[0][14], "slow sensors give the longer clock at SP 14");
    $display("limit cycles seen: %0d", n_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
