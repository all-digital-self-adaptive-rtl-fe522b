// Control block of the adaptive loop.
//
// Each round, on the clock edge that ends the sequencer's Capture cycle (the
// same edge on which the TDCs capture their delay lines), the setpoint
// register loads the external setpoint and L_prev loads the length currently
// in use. Combinationally
//     Err    = SP - Crs*        (signed)
//     L_VLRO = L_prev + Err
// where Crs* is the worst (smallest) TDC reading. The result settles during
// the multi-cycle wait and is loaded into the oscillator when e_config (the
// sequencer's Config strobe, one cycle wide) is high. Because nothing changes
// between Config and the next Capture, L_prev always equals the length the
// oscillator is running with.
// Registers, subtractor, adder and sequencer follow the document's control
// schematic. The clamp of L_VLRO to [L_MIN, 2^L_W-1] (instead of wrapping)
// and the reset value L_RESET of L_prev are this design's choices.
`timescale 1ps/1ps
module adapt_control
  import adapt_pkg::*;
#(
  parameter int SP_W_P        = SP_W,
  parameter int L_W_P         = L_W,
  parameter int L_MIN_P       = L_MIN,
  parameter int L_RESET_P     = L_RESET,
  parameter int CONFIG_WAIT_P = CONFIG_WAIT,
  parameter int IDLE_WAIT_P   = IDLE_WAIT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [SP_W_P-1:0] setpoint,
  input  logic [SP_W_P-1:0] crs_min,
  output logic [L_W_P-1:0]  l_vlro,
  output logic [L_W_P-1:0]  l_prev,
  output logic signed [SP_W_P:0] err,
  output logic              e_config,
  output logic              capture
);
  localparam int SUM_W = L_W_P + 2;
  localparam int L_MAX = (1 << L_W_P) - 1;

  logic [SP_W_P-1:0] sp_q;
  logic signed [SUM_W-1:0] sum;

  adapt_fsm #(.CONFIG_WAIT_P(CONFIG_WAIT_P), .IDLE_WAIT_P(IDLE_WAIT_P)) u_fsm (
    .clk      (clk),
    .rst      (rst),
    .trig     (),
    .capture  (capture),
    .config_en(e_config),
    .phase    ()
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sp_q   <= '0;
      l_prev <= L_W_P'(L_RESET_P);
    end else if (capture) begin
      sp_q   <= setpoint;
      l_prev <= l_vlro;
    end
  end

  always_comb begin
    err = $signed({1'b0, sp_q}) - $signed({1'b0, crs_min});
    sum = $signed({2'b00, l_prev}) + SUM_W'(err);
    if (sum < SUM_W'(L_MIN_P))    l_vlro = L_W_P'(L_MIN_P);
    else if (sum > SUM_W'(L_MAX)) l_vlro = L_W_P'(L_MAX);
    else                          l_vlro = sum[L_W_P-1:0];
  end
endmodule
