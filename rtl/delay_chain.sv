// Behavioural model: chain of GATES identical logic gates (LUTs) in series.
//
// Used for the TDC offset delay (m gates) and for each TDC stage delay
// (k gates). Logically the chain is a buffer; what matters is its propagation
// delay, GATES * GATE_PS picoseconds, modelled here with one (inertial)
// continuous-assignment delay per gate. In an implementation every gate must
// be kept (not optimised away) and placed as a real chain. GATE_PS is this
// model's own calibration (about 0.3 ns per LUT including routing), chosen so
// that the reference configuration lands near the measured clock periods.
`timescale 1ps/1ps
module delay_chain #(
  parameter int GATES   = 8,     // >= 1
  parameter int GATE_PS = 300
) (
  input  logic din,
  output logic dout
);
  logic [GATES:0] node;
  assign node[0] = din;
  for (genvar g = 0; g < GATES; g++) begin : g_gate
    assign #(GATE_PS) node[g+1] = node[g];
  end
  assign dout = node[GATES];
endmodule
