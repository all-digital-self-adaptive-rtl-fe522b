// Self-checking testbench for delay_chain: the output must follow rising and
// falling input edges exactly GATES * GATE_PS later, for two chain lengths.
`timescale 1ps/1ps
module tb_delay_chain;
  logic din = 1'b0;
  logic d8, d5;
  int checks = 0, failures = 0;

  delay_chain #(.GATES(8), .GATE_PS(300)) dut8 (.din, .dout(d8));
  delay_chain #(.GATES(5), .GATE_PS(250)) dut5 (.din, .dout(d5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #10_000;
    din = 1'b1;
    #1249; check(d5 == 1'b0, "5-gate chain not yet risen");
    #2;    check(d5 == 1'b1, "5-gate chain risen after 1250 ps");
    #1147; check(d8 == 1'b0, "8-gate chain not yet risen");
    #2;    check(d8 == 1'b1, "8-gate chain risen after 2400 ps");
    #10_000;
    din = 1'b0;
    #2399; check(d8 == 1'b1, "8-gate chain not yet fallen");
    #2;    check(d8 == 1'b0 && d5 == 1'b0, "chains fallen");
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
