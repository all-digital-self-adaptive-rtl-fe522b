// Behavioural stand-in for the global clock buffer / clock tree: the
// oscillator clock reaches the rest of the die DELAY_PS later. Testbench only.
`timescale 1ps/1ps
module bufg_model #(
  parameter int DELAY_PS = 1500
) (
  input  logic i,
  output logic o
);
  assign #(DELAY_PS) o = i;
endmodule
