// Time-variable-gain (TVG) controller, FPGA top level.
//
// A sonar or echo-sounder receiver needs a gain that grows with the time
// since transmission, because echoes from farther targets are weaker. Here
// the gain of a linear-in-dB amplifier is set by the output voltage of a
// 14-bit serial DAC, and this top writes that DAC: a linear ramp of codes
// (0 to about 2.9 V of a 3.3 V range), then a constant hold code until the
// next transmission, repeated every ~100 ms (10 Hz).
//
//   sclk_gen  50 MHz clk / 10 -> 5 MHz SCLK and a per-SCLK step enable
//   tvg_fsm   state machine: ramp accumulator, hold value, 16-bit SPI frames
//   tx_gate   0.1 ms transmit gate at each cycle start
//
// The DAC pins are dac_sync_n (SYNC#), dac_sclk (SCLK) and dac_sdin (SDIN);
// the DAC samples SDIN on SCLK falling edges. One frame is 16 SCLKs with
// SYNC# low, frames start every 92 SCLKs (18.4 us), a TVG cycle holds 5400
// frames (99.36 ms). The analog DAC and amplifier are outside the FPGA.
// Parameters pass straight to the blocks; their defaults are the described
// values. dout, state and sample_count are brought out for observation.
module tvg_top
  import tvg_pkg::*;
#(
  parameter int unsigned DIV           = 10,
  parameter int unsigned STEP          = 4,
  parameter int unsigned HOLD_CODE     = 14398,
  parameter int unsigned RAMP_LIMIT    = 3601,
  parameter int unsigned CYCLE_SAMPLES = 5400,
  parameter int unsigned GAP_LAST      = 73,
  parameter int unsigned TX_STEPS      = 500
) (
  input  logic        clk,          // 50 MHz board clock
  input  logic        rst_n,        // synchronous, active low
  output logic        dac_sync_n,
  output logic        dac_sclk,
  output logic        dac_sdin,
  output logic        tx_pulse,     // transmit gate, 0.1 ms per cycle
  output logic        cycle_start,  // one-step strobe at each TVG cycle start
  output dac_code_t   dout,
  output tvg_state_e  state,
  output logic [12:0] sample_count
);

  logic step;

  sclk_gen #(.DIV(DIV)) u_sclk (
    .clk   (clk),
    .rst_n (rst_n),
    .sclk  (dac_sclk),
    .step  (step)
  );

  tvg_fsm #(
    .STEP          (STEP),
    .HOLD_CODE     (HOLD_CODE),
    .RAMP_LIMIT    (RAMP_LIMIT),
    .CYCLE_SAMPLES (CYCLE_SAMPLES),
    .GAP_LAST      (GAP_LAST)
  ) u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .step         (step),
    .sync_n       (dac_sync_n),
    .sdin         (dac_sdin),
    .cycle_start  (cycle_start),
    .dout         (dout),
    .state        (state),
    .sample_count (sample_count)
  );

  tx_gate #(.TX_STEPS(TX_STEPS)) u_tx (
    .clk         (clk),
    .rst_n       (rst_n),
    .step        (step),
    .cycle_start (cycle_start),
    .tx_pulse    (tx_pulse)
  );

endmodule
