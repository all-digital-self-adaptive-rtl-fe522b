// Self-checking testbench for tdc_stage: p_out is p_in delayed by
// STAGE_GATES * GATE_PS; tap samples p_out on a rising clock edge only while
// en is high, and is cleared by reset.
`timescale 1ps/1ps
module tb_tdc_stage;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, p_in = 1'b0;
  logic p_out, tap;
  int checks = 0, failures = 0;

  tdc_stage #(.STAGE_GATES(8), .GATE_PS(300)) dut (.clk, .rst, .en, .p_in, .p_out, .tap);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic pulse_clk;
    #1000 clk = 1'b1; #1000 clk = 1'b0;
  endtask

  initial begin
    pulse_clk();
    check(tap == 1'b0, "reset holds tap low");
    rst = 1'b0;
    // Edge launched 2000 ps before the clock edge: not yet through 2400 ps.
    p_in = 1'b1; en = 1'b1;
    #1000 check(p_out == 1'b0, "p_out not yet risen");
    clk = 1'b1; #1;
    check(tap == 1'b0, "edge still inside the stage: tap = 0");
    #1400 check(p_out == 1'b1, "p_out risen after 2400 ps");
    clk = 1'b0;
    #500 clk = 1'b1; #1;
    check(tap == 1'b1, "edge through the stage: tap = 1");
    clk = 1'b0; en = 1'b0; p_in = 1'b0;
    #3000 clk = 1'b1; #1;
    check(tap == 1'b1, "tap holds while en = 0");
    clk = 1'b0; en = 1'b1;
    #1000 clk = 1'b1; #1;
    check(tap == 1'b0, "tap reloads with en = 1");
    clk = 1'b0; p_in = 1'b1;
    #5000 clk = 1'b1; #1;
    check(tap == 1'b1, "tap = 1 again");
    rst = 1'b1; #1;
    check(tap == 1'b0, "asynchronous reset clears tap");
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
