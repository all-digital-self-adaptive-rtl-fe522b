// Self-adaptive clock generator for dynamic frequency scaling (top level).
//
// A closed loop sets the length of a ring oscillator so that, in one clock
// period, a transition crosses exactly `setpoint` delay stages in the slowest
// of N_TDC sensors spread over the die:
//   tdc[i]        measure propagation length crs[i] with the global clock
//   tdc_min       worst reading crs_min = min(crs[i])
//   adapt_control L_VLRO = L_prev + (setpoint - crs_min), e_config strobe
//   vlro_decoder  L_VLRO -> Pass / Select vectors
//   vlro          ring oscillator; its control registers run on its own clock
// The oscillator output clk_vlro leaves the block to be buffered onto the
// global clock network, which returns as clk_global and clocks every register
// here except the oscillator's control registers. The global buffer is
// outside this block; its delay must be shorter than one clock period.
// Since the ring is built from the same kind of gates as the rest of the die,
// its period follows uniform PVTA changes by itself; the TDCs correct for the
// local differences. A larger setpoint gives a longer period, so the setpoint
// is also a frequency-selection input.
// All sequencers share rst and clk_global, so Trig/Capture/Config of every TDC
// and of the control block coincide. One adaptation round takes
// 2 + CONFIG_WAIT + IDLE_WAIT global cycles (8 by default).
// Per-sensor offset/stage gate counts default to the document's spatial
// variation experiment (16/8, 14/7, 12/6, 10/5 gates).
`timescale 1ps/1ps
module adaptive_clock_system
  import adapt_pkg::*;
#(
  parameter int N_TDC_P                  = N_TDC,
  parameter int OFFSET_GATES [N_TDC_P]   = '{16, 14, 12, 10},
  parameter int STAGE_GATES  [N_TDC_P]   = '{8, 7, 6, 5},
  parameter int GATE_PS                  = 300,
  parameter int STAGE_PS                 = 1052,
  parameter int CONFIG_WAIT_P            = CONFIG_WAIT,
  parameter int IDLE_WAIT_P              = IDLE_WAIT
) (
  input  logic            rst,
  input  logic [SP_W-1:0] setpoint,
  input  logic            clk_global,
  output logic            clk_vlro,
  output logic [SP_W-1:0] crs [N_TDC_P],
  output logic [SP_W-1:0] crs_min,
  output logic [L_W-1:0]  l_vlro,
  output logic [L_W-1:0]  l_active,
  output logic            e_config,
  output logic            capture
);
  logic [CTRL_W-1:0]      pass, sel;
  logic [N_TDC_P-1:0]     tdc_capture;

  for (genvar i = 0; i < N_TDC_P; i++) begin : g_tdc
    tdc #(
      .N_STAGES_P   (N_STAGES),
      .OFFSET_GATES (OFFSET_GATES[i]),
      .STAGE_GATES  (STAGE_GATES[i]),
      .GATE_PS      (GATE_PS),
      .CONFIG_WAIT_P(CONFIG_WAIT_P),
      .IDLE_WAIT_P  (IDLE_WAIT_P),
      .OUT_W        (SP_W)
    ) u_tdc (
      .clk    (clk_global),
      .rst    (rst),
      .crs    (crs[i]),
      .tap    (),
      .capture(tdc_capture[i])
    );
  end

  tdc_min #(.N_IN(N_TDC_P), .W(SP_W)) u_min (
    .crs    (crs),
    .crs_min(crs_min)
  );

  adapt_control #(
    .SP_W_P       (SP_W),
    .L_W_P        (L_W),
    .CONFIG_WAIT_P(CONFIG_WAIT_P),
    .IDLE_WAIT_P  (IDLE_WAIT_P)
  ) u_ctrl (
    .clk     (clk_global),
    .rst     (rst),
    .setpoint(setpoint),
    .crs_min (crs_min),
    .l_vlro  (l_vlro),
    .l_prev  (),
    .err     (),
    .e_config(e_config),
    .capture (capture)
  );

  vlro_decoder #(.L_W(L_W), .CTRL_W(CTRL_W)) u_dec (
    .len (l_vlro),
    .pass(pass),
    .sel (sel)
  );

  vlro #(.L_W_P(L_W), .CTRL_W_P(CTRL_W), .STAGE_PS(STAGE_PS)) u_vlro (
    .rst       (rst),
    .e_config  (e_config),
    .pass      (pass),
    .sel       (sel),
    .clk_out   (clk_vlro),
    .len_active(l_active)
  );

  // Every sequencer shares clock and reset, so all strobes must coincide.
  assert property (@(posedge clk_global) disable iff (rst)
                   tdc_capture == {N_TDC_P{capture}})
    else $error("TDC and control sequencers out of step");
endmodule
