// Self-checking testbench for vlro_decoder: for every length 0..31 the Pass
// vector must be the thermometer code of stages 1..L-1 and Select must mark
// stage L alone (no bit for L = 31, the always-closing last stage); L = 0
// decodes as L = 1.
`timescale 1ps/1ps
module tb_vlro_decoder;
  localparam int L_W = 5, CTRL_W = 30;
  logic [L_W-1:0]    len;
  logic [CTRL_W-1:0] pass, sel;
  int checks = 0, failures = 0;

  vlro_decoder #(.L_W(L_W)) dut (.len, .pass, .sel);

  initial begin
    for (int l = 0; l < 32; l++) begin
      int le;
      logic [CTRL_W-1:0] ep, es;
      le = (l == 0) ? 1 : l;
      ep = '0; es = '0;
      for (int s = 1; s < le && s <= CTRL_W; s++) ep[s-1] = 1'b1;
      if (le <= CTRL_W) es[le-1] = 1'b1;
      len = L_W'(l);
      #1;
      checks++;
      if (pass !== ep || sel !== es) begin
        failures++;
        $display("FAIL: L=%0d pass=%b sel=%b", l, pass, sel);
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
