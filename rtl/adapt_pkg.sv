// Shared constants and types of the self-adaptive clock generator.
//
// The loop sizes follow the FPGA prototype the design is built around: a 4-bit
// setpoint and TDC reading (15 delay stages plus an offset stage), a 5-bit VLRO
// length addressing 32 ring stages, four TDC sensors, and a sequencer that waits
// five clock periods between capturing the TDCs and loading the oscillator.
// The Pass/Select vectors are 2^L_W - 2 bits wide: the first and last ring stage
// need no control bit. The reset length is this design's own choice.
`timescale 1ps/1ps
package adapt_pkg;
  localparam int SP_W        = 4;                 // setpoint and TDC output width
  localparam int L_W         = 5;                 // VLRO length width (n + k)
  localparam int N_STAGES    = (1 << SP_W) - 1;   // 15 TDC delay stages
  localparam int N_TDC       = 4;                 // number of TDC sensors
  localparam int CTRL_W      = (1 << L_W) - 2;    // 30 Pass / Select bits
  localparam int CONFIG_WAIT = 5;                 // cycles from Capture to Config
  localparam int IDLE_WAIT   = 1;                 // cycles from Config to next Trig
  localparam int L_MIN       = 1;                 // shortest legal ring length
  localparam int L_RESET     = 16;                // length used right after reset

  // Phases of the measurement / configuration sequencer.
  typedef enum logic [2:0] {
    PH_IDLE    = 3'd0,   // wait after a Config before the next measurement
    PH_TRIG    = 3'd1,   // Trig high: the trigger flop launches a rising edge
    PH_CAPTURE = 3'd2,   // Capture high: tap registers sample the delay line
    PH_WAIT    = 3'd3,   // multi-cycle settling of the TDC -> VLRO path
    PH_CONFIG  = 3'd4    // Config high: VLRO control registers load
  } phase_e;
endpackage
