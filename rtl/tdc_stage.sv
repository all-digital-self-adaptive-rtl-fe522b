// One stage of the time-to-digital converter delay line.
//
// A stage is a delay of k gates (STAGE_GATES) followed by a capture flip-flop.
// The delayed signal continues to the next stage through p_out; when en
// (the sequencer's Capture strobe) is high, the flip-flop samples it on the
// rising clock edge and presents it as tap. tap = 1 means the launched rising
// edge had passed this stage when the clock edge arrived. Structure as in the
// document's TDC schematic; the asynchronous active-high reset of the flop is
// this design's reading of its R input.
`timescale 1ps/1ps
module tdc_stage #(
  parameter int STAGE_GATES = 8,
  parameter int GATE_PS     = 300
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic p_in,
  output logic p_out,
  output logic tap
);
  delay_chain #(.GATES(STAGE_GATES), .GATE_PS(GATE_PS)) u_delay (
    .din (p_in),
    .dout(p_out)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     tap <= 1'b0;
    else if (en) tap <= p_out;
  end
endmodule
