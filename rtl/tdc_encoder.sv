// TDC output encoder.
//
// Converts the N captured tap bits of the delay line into the number of
// stages the launched rising edge has crossed. A clean capture is a
// thermometer code (taps 0..c-1 high, the rest low). This encoder counts the
// consecutive ones starting at tap 0, so a remnant of an earlier pulse still
// travelling near the far end of the line (possible when the clock period is
// short compared with the whole line) does not add to the reading. The
// document only says the encoder outputs the number of stages traversed; the
// leading-ones count is this design's choice. Purely combinational.
`timescale 1ps/1ps
module tdc_encoder #(
  parameter int N     = 15,
  parameter int OUT_W = $clog2(N + 1)
) (
  input  logic [N-1:0]     tap,
  output logic [OUT_W-1:0] crs
);
  always_comb begin
    logic run;
    crs = '0;
    run = 1'b1;
    for (int i = 0; i < N; i++) begin
      run = run & tap[i];
      crs = crs + OUT_W'(run);
    end
  end
endmodule
