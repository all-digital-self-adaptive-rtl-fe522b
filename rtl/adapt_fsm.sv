// Measurement / configuration sequencer.
//
// One copy of this FSM sits in every TDC sensor and one in the control block.
// All copies share the same clock and reset, so they run in lock step and
// produce identical Trig, Capture and Config strobes without any wiring
// between them. One round is:
//   PH_TRIG    (1 cycle)  trig    = 1 : the TDC trigger flop samples 1 at the
//                                       end of this cycle and launches an edge
//   PH_CAPTURE (1 cycle)  capture = 1 : one clock period after the launch the
//                                       tap registers (and the setpoint and
//                                       L_prev registers) load
//   PH_WAIT    (CONFIG_WAIT-1 cycles)  : the TDC -> VLRO path settles
//   PH_CONFIG  (1 cycle)  config  = 1 : VLRO control registers load; Config is
//                                       asserted CONFIG_WAIT cycles after Capture
//   PH_IDLE    (IDLE_WAIT cycles)      : the new clock period settles
// The Trig/Capture/Config outputs and the five-period wait are the document's;
// the idle phase and its length, the state encoding and the asynchronous
// active-high reset are this design's choices. Outputs are decoded from the
// registered phase (Moore).
`timescale 1ps/1ps
module adapt_fsm
  import adapt_pkg::*;
#(
  parameter int CONFIG_WAIT_P = CONFIG_WAIT,  // >= 1
  parameter int IDLE_WAIT_P   = IDLE_WAIT     // >= 1
) (
  input  logic   clk,
  input  logic   rst,        // asynchronous, active high
  output logic   trig,
  output logic   capture,
  output logic   config_en,
  output phase_e phase
);
  localparam int CNT_W = $clog2(CONFIG_WAIT_P + IDLE_WAIT_P + 1);

  phase_e           state;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= PH_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        PH_IDLE: begin
          if (int'(cnt) >= IDLE_WAIT_P - 1) begin
            state <= PH_TRIG;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_TRIG:    state <= PH_CAPTURE;
        PH_CAPTURE: begin
          cnt   <= '0;
          state <= (CONFIG_WAIT_P > 1) ? PH_WAIT : PH_CONFIG;
        end
        PH_WAIT: begin
          if (int'(cnt) >= CONFIG_WAIT_P - 2) begin
            state <= PH_CONFIG;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_CONFIG: begin
          state <= PH_IDLE;
          cnt   <= '0;
        end
        default: begin
          state <= PH_IDLE;
          cnt   <= '0;
        end
      endcase
    end
  end

  assign trig      = (state == PH_TRIG);
  assign capture   = (state == PH_CAPTURE);
  assign config_en = (state == PH_CONFIG);
  assign phase     = state;
endmodule
