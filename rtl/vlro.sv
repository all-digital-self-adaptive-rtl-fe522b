// Behavioural model: variable length ring oscillator (VLRO) with its control
// registers.
//
// The oscillator synthesises the system clock. Its control registers hold the
// Pass and Select vectors; they are clocked by the oscillator's own output
// (the local clock, ahead of the global clock buffer) and load only while
// e_config is high. Because e_config comes from the global clock domain and is
// one global cycle wide, it is seen by exactly one local edge as long as the
// buffer delay is shorter than a period.
// The ring itself is modelled, not built from gates: starting at stage 1 the
// wave moves on through every stage whose Pass bit is set and turns back at
// the first stage whose Select bit is set (or at the last stage), so a length
// L uses stages 0..L and the output toggles every (L+1) * STAGE_PS ps, a
// period of 2*(L+1)*STAGE_PS. A new length takes effect from the next
// half-period, so the output never glitches. STAGE_PS (forward plus return
// delay of one stage, ~1.05 ns) is a calibration of this model against the
// reported FPGA periods, not a figure from the document; 1052 rather than 1050
// keeps every period off the 300 ps grid of the default sensor gate delay. The register
// clocking, the e_config enable, the 32 stages and the vector widths follow the
// document; the register reset value (the decoded L_RESET) is this design's.
`timescale 1ps/1ps
module vlro
  import adapt_pkg::*;
#(
  parameter int L_W_P     = L_W,
  parameter int CTRL_W_P  = (1 << L_W_P) - 2,
  parameter int L_RESET_P = L_RESET,
  parameter int STAGE_PS  = 1052
) (
  input  logic                rst,
  input  logic                e_config,
  input  logic [CTRL_W_P-1:0] pass,
  input  logic [CTRL_W_P-1:0] sel,
  output logic                clk_out,
  output logic [L_W_P-1:0]    len_active
);
  logic [CTRL_W_P-1:0] pass_q, sel_q;
  logic [CTRL_W_P-1:0] pass_rst, sel_rst;

  vlro_decoder #(.L_W(L_W_P), .CTRL_W(CTRL_W_P)) u_rst_dec (
    .len (L_W_P'(L_RESET_P)),
    .pass(pass_rst),
    .sel (sel_rst)
  );

  // Control registers, clocked by the oscillator's own output.
  always_ff @(posedge clk_out or posedge rst) begin
    if (rst) begin
      pass_q <= pass_rst;
      sel_q  <= sel_rst;
    end else if (e_config) begin
      pass_q <= pass;
      sel_q  <= sel;
    end
  end

  // Loop length: the stage where the wave turns back.
  always_comb begin
    int s;
    s = 1;
    while (s <= CTRL_W_P && pass_q[s-1] && !sel_q[s-1]) s++;
    len_active = L_W_P'(s);
  end

  initial clk_out = 1'b0;
  always begin
    #((int'(len_active) + 1) * STAGE_PS);
    clk_out = ~clk_out;
  end
endmodule
