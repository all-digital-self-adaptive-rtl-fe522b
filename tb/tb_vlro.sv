// Self-checking testbench for the vlro model.
// After reset the ring runs at the reset length. New Pass/Select vectors
// (built here for a chosen length: Pass on stages 1..L-1, Select on stage L)
// must not change the period until e_config is pulsed, one cycle wide, in a
// clock domain delayed by 1.5 ns as the global clock would be. After the load
// the period must be 2 * (L + 1) * STAGE_PS and the reported length L, for
// lengths across the whole range including 1 and 31.
`timescale 1ps/1ps
module tb_vlro;
  import adapt_pkg::*;
  localparam int STAGE = 1052;
  logic rst = 1'b1, e_config = 1'b0;
  logic [29:0] pass, sel;
  logic clk_out, gclk;
  logic [4:0] len_active;
  int checks = 0, failures = 0;

  vlro dut (.rst, .e_config, .pass, .sel, .clk_out, .len_active);
  bufg_model #(.DELAY_PS(1500)) u_buf (.i(clk_out), .o(gclk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic set_len(input int l);
    pass = '0; sel = '0;
    for (int s = 1; s < l && s <= 30; s++) pass[s-1] = 1'b1;
    if (l <= 30) sel[l-1] = 1'b1;
  endtask

  task automatic measure(output longint per);
    longint t0;
    @(posedge clk_out); t0 = $time;
    @(posedge clk_out); per = $time - t0;
  endtask

  initial begin
    longint per;
    int lens [8] = '{5, 1, 31, 18, 4, 10, 2, 16};
    set_len(3);
    #20_000 rst = 1'b0;
    repeat (2) @(posedge clk_out);
    measure(per);
    check(per == 2 * (L_RESET + 1) * STAGE, $sformatf("reset period %0d", per));
    check(int'(len_active) == L_RESET, "reset length");
    foreach (lens[i]) begin
      set_len(lens[i]);
      repeat (3) @(posedge clk_out);
      measure(per);
      check(per != 2 * (lens[i] + 1) * STAGE || lens[i] == int'(len_active), "no change without e_config");
      // One global-clock cycle of e_config.
      @(posedge gclk); e_config = 1'b1;
      @(posedge gclk); e_config = 1'b0;
      repeat (2) @(posedge clk_out);
      measure(per);
      check(per == 2 * (lens[i] + 1) * STAGE, $sformatf("L=%0d period %0d", lens[i], per));
      check(int'(len_active) == lens[i], "active length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
