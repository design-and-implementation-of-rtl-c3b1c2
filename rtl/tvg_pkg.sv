// Shared types and constants of the time-variable-gain (TVG) controller.
//
// The controller drives a 14-bit serial DAC whose output voltage sets the
// gain of a linear-in-dB amplifier. A DAC write is a 16-bit word: two
// power-down bits (00 = normal operation) followed by the 14-bit code, most
// significant bit first. The state encoding below follows the state diagram
// of the controller; the numeric encoding itself is this design's choice.
package tvg_pkg;

  localparam int unsigned DAC_BITS = 14;  // DAC resolution; a write is
                                          // 2 power-down bits + DAC_BITS

  typedef logic [DAC_BITS-1:0] dac_code_t;

  // INIT       : start of a TVG cycle, accumulator and sample count cleared
  // ADDING     : gap counter cleared, accumulator += step, end-of-cycle test
  // SENDING_1  : SYNC# low, first power-down bit
  // SENDING_2  : second power-down bit, choose ramp or hold value
  // RAMP       : shift the 14 accumulator bits out
  // HOLD_STATE : shift the 14 hold-value bits out
  // SYNC_HIGH  : SYNC# back high, frame complete
  // SENDING_3  : wait out the rest of the sample period
  typedef enum logic [2:0] {
    ST_INIT       = 3'd0,
    ST_ADDING     = 3'd1,
    ST_SENDING_1  = 3'd2,
    ST_SENDING_2  = 3'd3,
    ST_RAMP       = 3'd4,
    ST_HOLD_STATE = 3'd5,
    ST_SYNC_HIGH  = 3'd6,
    ST_SENDING_3  = 3'd7
  } tvg_state_e;

endpackage
