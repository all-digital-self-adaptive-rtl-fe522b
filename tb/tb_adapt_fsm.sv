// Self-checking testbench for adapt_fsm.
// Runs the sequencer for many rounds and checks, cycle by cycle, that exactly
// one strobe at a time follows the order Trig, Capture, (CONFIG_WAIT-1 idle),
// Config, (IDLE_WAIT idle), that Config comes CONFIG_WAIT cycles after
// Capture, and that a round lasts 2 + CONFIG_WAIT + IDLE_WAIT cycles.
// A second instance with other waits checks the parameters are honoured.
`timescale 1ps/1ps
module tb_adapt_fsm;
  import adapt_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  logic trig, capture, config_en, trig2, capture2, config2;
  phase_e phase, phase2;

  adapt_fsm dut (.clk, .rst, .trig, .capture, .config_en, .phase);
  adapt_fsm #(.CONFIG_WAIT_P(2), .IDLE_WAIT_P(3)) dut2 (
    .clk, .rst, .trig(trig2), .capture(capture2), .config_en(config2), .phase(phase2));

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Expected position in a round, counted from the Trig cycle.
  function automatic void expect_at(input int pos, input int cw, input int iw,
                                    output bit t, output bit c, output bit g);
    t = (pos == 0);
    c = (pos == 1);
    g = (pos == 1 + cw);
  endfunction

  initial begin
    int n_trig = 0, n_cap = 0, n_cfg = 0;
    int pos = -1, pos2 = -1, last_cap = -1, last_trig = -1, cyc = 0;
    bit et, ec, eg;
    repeat (3) @(posedge clk);
    #1000 rst = 1'b0;
    repeat (200) begin
      @(posedge clk); #1;
      cyc++;
      if (trig)  pos = 0; else if (pos >= 0) pos++;
      if (trig2) pos2 = 0; else if (pos2 >= 0) pos2++;
      check(int'(trig) + int'(capture) + int'(config_en) <= 1, "one strobe at a time");
      if (pos >= 0) begin
        expect_at(pos, CONFIG_WAIT, IDLE_WAIT, et, ec, eg);
        check(capture == ec && config_en == eg, "strobe order, default waits");
        check(pos < 2 + CONFIG_WAIT + IDLE_WAIT, "round length, default waits");
      end
      if (pos2 >= 0) begin
        expect_at(pos2, 2, 3, et, ec, eg);
        check(capture2 == ec && config2 == eg, "strobe order, other waits");
        check(pos2 < 2 + 2 + 3, "round length, other waits");
      end
      if (trig) begin
        if (last_trig >= 0) check(cyc - last_trig == 2 + CONFIG_WAIT + IDLE_WAIT, "Trig spacing");
        last_trig = cyc; n_trig++;
      end
      if (capture) begin last_cap = cyc; n_cap++; end
      if (config_en) begin
        check(last_cap >= 0 && cyc - last_cap == CONFIG_WAIT, "Config CONFIG_WAIT cycles after Capture");
        n_cfg++;
      end
    end
    check(n_trig >= 20 && n_cap >= 20 && n_cfg >= 20, "strobes keep coming");
    // Reset in mid-round restarts the sequence.
    rst = 1'b1; #1;
    check(!trig && !capture && !config_en, "reset clears strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
