// VLRO length decoder.
//
// Translates the ring length L into the two control vectors of the variable
// length ring oscillator. The ring has 2^L_W stages; stage 0 (the head, which
// holds the inverting element) is always in the loop and the last stage always
// turns the wave around, so only stages 1 .. 2^L_W-2 carry control bits, bit j
// of each vector belonging to stage j+1:
//   Pass[j]   = 1 when stage j+1 forwards the wave to the next stage (j+1 < L)
//   Select[j] = 1 when stage j+1 closes the loop, turning the wave back (j+1 == L)
// A length of L therefore uses stages 0..L, so the period grows linearly with L.
// The vector width follows the document; the exact meaning of each bit is this
// design's choice, since the inner structure of the oscillator is taken from
// earlier work. L = 0 is treated as L = 1. Purely combinational.
`timescale 1ps/1ps
module vlro_decoder #(
  parameter int L_W    = 5,
  parameter int CTRL_W = (1 << L_W) - 2
) (
  input  logic [L_W-1:0]    len,
  output logic [CTRL_W-1:0] pass,
  output logic [CTRL_W-1:0] sel
);
  logic [L_W-1:0] len_eff;
  assign len_eff = (len == '0) ? L_W'(1) : len;

  always_comb begin
    for (int j = 0; j < CTRL_W; j++) begin
      pass[j] = (j + 1 < int'(len_eff));
      sel[j]  = (j + 1 == int'(len_eff));
    end
  end
endmodule
