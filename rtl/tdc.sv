// Time-to-digital converter: propagation-length sensor.
//
// Measures how many delay stages a rising edge crosses in one clock period.
// The local sequencer (adapt_fsm) raises Trig for one cycle; the trigger flop
// samples it and launches a rising edge into an offset delay of OFFSET_GATES
// gates followed by N_STAGES stages of STAGE_GATES gates each. One clock period
// later Capture makes every stage register sample its delay output, and the
// encoder turns the captured thermometer code into crs, the number of stages
// crossed (0 .. N_STAGES). The trigger flop returns to 0 on the capture edge
// and the line drains during the rest of the round.
// The offset/stage lengths bias and scale the reading: more gates per stage
// (or slower gates) give a smaller crs for the same period. crs is updated on
// the clock edge that ends the Capture cycle and holds until the next one.
// Structure, stage count and gate counts follow the document; the encoder
// style and reset polarity are this design's choices.
`timescale 1ps/1ps
module tdc
  import adapt_pkg::*;
#(
  parameter int N_STAGES_P    = N_STAGES,
  parameter int OFFSET_GATES  = 16,
  parameter int STAGE_GATES   = 8,
  parameter int GATE_PS       = 300,
  parameter int CONFIG_WAIT_P = CONFIG_WAIT,
  parameter int IDLE_WAIT_P   = IDLE_WAIT,
  parameter int OUT_W         = $clog2(N_STAGES_P + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic [OUT_W-1:0]      crs,
  output logic [N_STAGES_P-1:0] tap,
  output logic                  capture
);
  logic   trig;
  logic   launch;                  // trigger flop output
  logic   line [N_STAGES_P+1];     // line[0]: after the offset delay

  adapt_fsm #(.CONFIG_WAIT_P(CONFIG_WAIT_P), .IDLE_WAIT_P(IDLE_WAIT_P)) u_fsm (
    .clk      (clk),
    .rst      (rst),
    .trig     (trig),
    .capture  (capture),
    .config_en(),
    .phase    ()
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) launch <= 1'b0;
    else     launch <= trig;
  end

  delay_chain #(.GATES(OFFSET_GATES), .GATE_PS(GATE_PS)) u_offset (
    .din (launch),
    .dout(line[0])
  );

  for (genvar s = 0; s < N_STAGES_P; s++) begin : g_stage
    tdc_stage #(.STAGE_GATES(STAGE_GATES), .GATE_PS(GATE_PS)) u_stage (
      .clk  (clk),
      .rst  (rst),
      .en   (capture),
      .p_in (line[s]),
      .p_out(line[s+1]),
      .tap  (tap[s])
    );
  end

  tdc_encoder #(.N(N_STAGES_P), .OUT_W(OUT_W)) u_enc (
    .tap(tap),
    .crs(crs)
  );
endmodule
