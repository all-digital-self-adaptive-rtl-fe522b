// Worst-case selector ("Min" block).
//
// A shorter propagation length means slower local logic, so the worst of the
// TDC readings is the smallest one. This block returns the minimum of N_IN
// unsigned readings as Crs*, the value the control loop regulates. Purely
// combinational: a linear scan, which is small for the four sensors of the
// reference configuration.
`timescale 1ps/1ps
module tdc_min #(
  parameter int N_IN = 4,
  parameter int W    = 4
) (
  input  logic [W-1:0] crs [N_IN],
  output logic [W-1:0] crs_min
);
  always_comb begin
    crs_min = crs[0];
    for (int i = 1; i < N_IN; i++) begin
      if (crs[i] < crs_min) crs_min = crs[i];
    end
  end
endmodule
