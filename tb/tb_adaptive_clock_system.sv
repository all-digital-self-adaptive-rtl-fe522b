// End-to-end testbench of the self-adaptive clock generator at its default
// parameters (four sensors with 16/8, 14/7, 12/6 and 10/5 gates of offset and
// stage delay), the oscillator clock returning through a 1.5 ns global buffer.
//
// The setpoint follows the measurement pattern: 14 down to 1, then 14, 1, 14,
// 1, then up to 14, each value held for HOLD adaptation rounds. Checked:
//  * every round, each sensor's reading against a timing model of its delay
//    line at the current clock period (either value at an exact tie);
//  * every Config, the new length against clamp(L + SP - min(Crs));
//  * every round, the oscillator period against 2 * (L + 1) * STAGE_PS;
//  * at the end of each hold, that the worst reading has reached the setpoint
//    or brackets it in a limit cycle (the loop cannot always hit it exactly);
//  * that the settled clock period rises with the setpoint (frequency
//    selection), and that the slowest sensor is the one regulated.
// Mechanisms counted, each of which must occur: length increase, length
// decrease, length hold, worst sensor differing from another sensor, a
// saturated (15) sensor reading, and a limit cycle or exact lock per setpoint.
`timescale 1ps/1ps
module tb_adaptive_clock_system;
  import adapt_pkg::*;
  localparam int GATE = 300, STAGE = 1052, HOLD = 10;
  localparam int OFFS [4] = '{16, 14, 12, 10};
  localparam int STGS [4] = '{8, 7, 6, 5};

  logic rst = 1'b1;
  logic [3:0] setpoint = 4'd14;
  logic clk_global, clk_vlro, e_config, capture;
  logic [3:0] crs [4];
  logic [3:0] crs_min;
  logic [4:0] l_vlro, l_active;
  int checks = 0, failures = 0;

  adaptive_clock_system dut (
    .rst, .setpoint, .clk_global, .clk_vlro, .crs, .crs_min,
    .l_vlro, .l_active, .e_config, .capture);
  bufg_model #(.DELAY_PS(1500)) u_bufg (.i(clk_vlro), .o(clk_global));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic void model(input int m, input int k, input int t_ps,
                                output int lo, output int hi);
    lo = 0; hi = 0;
    for (int s = 0; s < 15; s++) begin
      int arr = (m + (s + 1) * k) * GATE;
      if (arr < t_ps)  lo++;
      if (arr <= t_ps) hi++;
    end
  endfunction

  // Measured period of the global clock, refreshed every cycle.
  longint last_edge = 0, period = 0;
  always @(posedge clk_global) begin
    period    <= $time - last_edge;
    last_edge <= $time;
  end

  int n_up = 0, n_down = 0, n_hold = 0, n_worst_differs = 0, n_sat = 0;
  int n_lock = 0, n_cycle = 0;
  int settled_l [16];

  initial begin
    int pattern [$];
    int lo, hi, sp_cap, l_before, exp_l;
    for (int s = 14; s >= 1; s--) pattern.push_back(s);
    pattern.push_back(14); pattern.push_back(1); pattern.push_back(14); pattern.push_back(1);
    for (int s = 2; s <= 14; s++) pattern.push_back(s);
    foreach (settled_l[i]) settled_l[i] = -1;

    repeat (4) @(posedge clk_global);
    #500 rst = 1'b0;

    foreach (pattern[p]) begin
      automatic int mins [$];
      automatic int ls [$];
      setpoint = 4'(pattern[p]);
      for (int r = 0; r < HOLD; r++) begin
        // Capture cycle: sample the setpoint the control block will load.
        @(posedge clk_global iff capture);
        sp_cap = int'(setpoint);
        l_before = int'(l_active);
        #1;
        // Readings are now those of this round; the period of the round
        // just finished is the one measured.
        for (int i = 0; i < 4; i++) begin
          model(OFFS[i], STGS[i], int'(2 * (int'(l_active) + 1) * STAGE), lo, hi);
          check(int'(crs[i]) >= lo && int'(crs[i]) <= hi,
                $sformatf("TDC%0d reads %0d, model %0d..%0d at L=%0d", i, crs[i], lo, hi, l_active));
          if (crs[i] == 4'd15) n_sat++;
          if (crs[i] != crs_min) n_worst_differs++;
        end
        check(crs_min == crs[0], "slowest sensor TDC0 is the worst case");
        check(period == longint'(2 * (int'(l_active) + 1) * STAGE),
              $sformatf("period %0d at L=%0d", period, l_active));
        // Config cycle: the new length.
        @(posedge clk_global iff e_config);
        #1;
        exp_l = l_before + sp_cap - int'(crs_min);
        exp_l = (exp_l < L_MIN) ? L_MIN : (exp_l > 31) ? 31 : exp_l;
        check(int'(l_vlro) == exp_l, $sformatf("L_VLRO %0d expected %0d", l_vlro, exp_l));
        @(posedge clk_vlro); @(posedge clk_vlro); #1;
        check(l_active == l_vlro, "oscillator loaded the new length");
        if (int'(l_active) > l_before) n_up++;
        else if (int'(l_active) < l_before) n_down++;
        else n_hold++;
        if (r >= HOLD - 4) begin mins.push_back(int'(crs_min)); ls.push_back(l_before); end
      end
      begin
        automatic bit hit = 0, below = 0, above = 0;
        foreach (mins[i]) begin
          if (mins[i] == pattern[p]) hit = 1;
          if (mins[i] < pattern[p]) below = 1;
          if (mins[i] > pattern[p]) above = 1;
        end
        if (hit) n_lock++; else if (below && above) n_cycle++;
        check(hit || (below && above), $sformatf("setpoint %0d not reached", pattern[p]));
        settled_l[pattern[p]] = ls[ls.size()-1];
      end
    end

    // Frequency selection: the settled length (hence period) grows with SP.
    for (int s = 2; s <= 14; s++)
      check(settled_l[s] >= settled_l[s-1] - 1, $sformatf("length falls from SP %0d to %0d", s-1, s));
    check(settled_l[14] > settled_l[1] + 8, "period range spans the setpoints");

    $display("mechanisms: up=%0d down=%0d hold=%0d worst_differs=%0d saturated=%0d lock=%0d limit_cycle=%0d",
             n_up, n_down, n_hold, n_worst_differs, n_sat, n_lock, n_cycle);
    check(n_up > 0, "length increase happened");
    check(n_down > 0, "length decrease happened");
    check(n_hold > 0, "length hold happened");
    check(n_worst_differs > 0, "sensors disagreed");
    check(n_sat > 0, "saturated sensor reading happened");
    $display("settled L per setpoint 1..14: %p", settled_l);
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
