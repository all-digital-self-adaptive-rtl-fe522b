// Self-checking testbench for tdc.
// Two sensors (16/8 and 10/5 gates of offset/stage, 300 ps per gate) share a
// clock whose period is swept from 5 ns to 60 ns. After every Capture the
// reading of each sensor is compared with the count of stages s whose output
// edge, (m + (s+1)*k) * gate delay after the launch, arrives before the
// capture edge one period later (either value is accepted at an exact tie).
// Also checks the round length of 8 cycles, that readings never fall as the
// period grows (the shape of the measured TDC transfer curve) and that both
// ends of the range, 0 and 15, are reached.
`timescale 1ps/1ps
module tb_tdc;
  localparam int GATE = 300;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0]  crs_a, crs_b;
  logic [14:0] tap_a, tap_b;
  logic        cap_a, cap_b;
  int half_ps = 2500;
  int checks = 0, failures = 0;

  tdc #(.OFFSET_GATES(16), .STAGE_GATES(8), .GATE_PS(GATE)) dut_a (
    .clk, .rst, .crs(crs_a), .tap(tap_a), .capture(cap_a));
  tdc #(.OFFSET_GATES(10), .STAGE_GATES(5), .GATE_PS(GATE)) dut_b (
    .clk, .rst, .crs(crs_b), .tap(tap_b), .capture(cap_b));

  always begin #(half_ps) clk = ~clk; end

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

  initial begin
    int lo, hi, prev_a = -1, prev_b = -1, seen0 = 0, seen15 = 0;
    int cyc_at_cap = 0, cyc = 0, last_cap_cyc = -1;
    fork
      forever begin @(posedge clk); cyc++; end
    join_none
    repeat (3) @(posedge clk);
    #100 rst = 1'b0;
    for (int t = 5000; t <= 60000; t += 1100) begin
      // Change the period right after a capture; the next launch/capture pair
      // then sees only the new period.
      @(negedge cap_a);
      check(cap_a == cap_b, "sensors in step");
      if (last_cap_cyc >= 0) check(cyc - last_cap_cyc == 8, "8-cycle round");
      last_cap_cyc = cyc;
      half_ps = t / 2;
      @(negedge cap_a);
      last_cap_cyc = cyc;
      #1;
      model(16, 8, 2 * half_ps, lo, hi);
      check(int'(crs_a) >= lo && int'(crs_a) <= hi, $sformatf("16/8 sensor T=%0d crs=%0d", 2*half_ps, crs_a));
      check(int'(crs_a) >= prev_a, "16/8 reading monotonic in period");
      prev_a = int'(crs_a);
      model(10, 5, 2 * half_ps, lo, hi);
      check(int'(crs_b) >= lo && int'(crs_b) <= hi, $sformatf("10/5 sensor T=%0d crs=%0d", 2*half_ps, crs_b));
      check(int'(crs_b) >= prev_b, "10/5 reading monotonic in period");
      check(crs_b >= crs_a, "shorter stages read at least as many stages");
      prev_b = int'(crs_b);
      if (crs_a == 0) seen0++;
      if (crs_a == 15 && crs_b == 15) seen15++;
    end
    check(seen0 > 0, "zero reading reached");
    check(seen15 > 0, "saturated reading reached");
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
