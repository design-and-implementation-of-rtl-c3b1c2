// TVG state machine: ramp-then-hold gain control word generator.
//
// One TVG cycle starts at a transmission and lasts about 100 ms (10 Hz pulse
// repetition). In each cycle the controller writes CYCLE_SAMPLES values to a
// 14-bit serial DAC. Values with sample index below RAMP_LIMIT come from a
// ramp accumulator that grows by STEP every sample (4, 8, 12, ...), so the
// amplifier gain rises linearly in dB with echo delay. From sample RAMP_LIMIT
// on, the fixed HOLD_CODE (14398 = 2.9 V of a 3.3 V full scale) is sent, so
// late, strong echoes do not saturate the receiver. Then the cycle restarts
// from zero.
//
// Every state lasts one `step` (one SCLK period; `step` is a clk enable that
// marks the SCLK rising edge):
//   INIT        SYNC# high; accumulator and sample count cleared
//   ADDING      gap counter cleared; if sample < CYCLE_SAMPLES the
//               accumulator adds STEP and a frame starts, else back to INIT
//   SENDING_1   SYNC# low, power-down bit PD1 = 0
//   SENDING_2   power-down bit PD0 = 0; picks RAMP or HOLD_STATE
//   RAMP/HOLD   14 steps, data bit 13 down to 0 on SDIN
//   SYNC_HIGH   SYNC# high, the DAC updates
//   SENDING_3   gap counter counts 0..GAP_LAST, then sample count + 1
// So SYNC# is low for 16 SCLKs, a sample takes 18 + GAP_LAST + 1 = 92 SCLKs
// (18.4 us at 5 MHz) and a cycle 1 + 92*CYCLE_SAMPLES + 1 = 496802 SCLKs
// (99.36 ms).
//
// The state sequence, the step of 4, the 14398 hold value, the limits 3601
// and 5400 and the gap count of 73 follow the design description. This
// design's choices: INIT also clears the accumulator and the sample count;
// the two power-down bits are sent as 0 in SENDING_1/SENDING_2; the pin
// outputs (sync_n, sdin) are registered one clk after the state register so
// that they are free of decode glitches; reset is synchronous. With the
// described numbers the last ramp values (14400, 14404) lie a few codes above
// the hold value; that is kept as described.
//
// Interface: clk/rst_n, `step` enable in; sync_n, sdin to the DAC (sclk comes
// from the clock generator); cycle_start is high for the INIT step; dout is
// the code of the frame being sent; state and sample_count are for
// observation.
module tvg_fsm
  import tvg_pkg::*;
#(
  parameter int unsigned STEP          = 4,      // ramp increment per sample
  parameter int unsigned HOLD_CODE     = 14398,  // code sent after the ramp
  parameter int unsigned RAMP_LIMIT    = 3601,   // samples below this are ramp
  parameter int unsigned CYCLE_SAMPLES = 5400,   // samples per TVG cycle
  parameter int unsigned GAP_LAST      = 73      // last value of the gap counter
) (
  input  logic       clk,
  input  logic       rst_n,        // synchronous, active low
  input  logic       step,         // advance one state (SCLK rising edge)
  output logic       sync_n,       // DAC SYNC#, low while a word is shifted
  output logic       sdin,         // DAC serial data
  output logic       cycle_start,  // high during the INIT step
  output dac_code_t  dout,         // code of the current / last frame
  output tvg_state_e state,
  output logic [12:0] sample_count
);

  localparam int unsigned GW = $clog2(GAP_LAST + 1) > 0 ? $clog2(GAP_LAST + 1) : 1;

  tvg_state_e     state_q;
  logic [12:0]    sample_q;
  dac_code_t      mem_q;        // ramp accumulator
  logic [3:0]     bit_q;        // bit index i / n of RAMP and HOLD_STATE
  logic [GW-1:0]  gap_q;        // counter of SENDING_3
  dac_code_t      dout_q;

  localparam dac_code_t HOLD_MEM = dac_code_t'(HOLD_CODE);
  localparam dac_code_t STEP_C   = dac_code_t'(STEP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= ST_INIT;
      sample_q <= '0;
      mem_q    <= '0;
      bit_q    <= '0;
      gap_q    <= '0;
      dout_q   <= '0;
    end else if (step) begin
      unique case (state_q)
        ST_INIT: begin
          mem_q    <= '0;
          sample_q <= '0;
          state_q  <= ST_ADDING;
        end
        ST_ADDING: begin
          gap_q <= '0;
          if (32'(sample_q) < CYCLE_SAMPLES) begin
            mem_q   <= mem_q + STEP_C;
            state_q <= ST_SENDING_1;
          end else begin
            state_q <= ST_INIT;
          end
        end
        ST_SENDING_1: state_q <= ST_SENDING_2;
        ST_SENDING_2: begin
          bit_q <= '0;
          if (32'(sample_q) < RAMP_LIMIT) begin
            state_q <= ST_RAMP;
            dout_q  <= mem_q;
          end else begin
            state_q <= ST_HOLD_STATE;
            dout_q  <= HOLD_MEM;
          end
        end
        ST_RAMP, ST_HOLD_STATE: begin
          bit_q <= bit_q + 1'b1;
          if (bit_q == 4'(DAC_BITS - 1)) state_q <= ST_SYNC_HIGH;
        end
        ST_SYNC_HIGH: state_q <= ST_SENDING_3;
        ST_SENDING_3: begin
          if (gap_q == GW'(GAP_LAST)) begin
            sample_q <= sample_q + 1'b1;
            state_q  <= ST_ADDING;
          end else begin
            gap_q <= gap_q + 1'b1;
          end
        end
        default: state_q <= ST_INIT;
      endcase
    end
  end

  // Pin outputs, registered from the current state.
  logic [3:0] bit_pos;
  assign bit_pos = 4'(DAC_BITS - 1) - bit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_n <= 1'b1;
      sdin   <= 1'b0;
    end else begin
      unique case (state_q)
        ST_SENDING_1, ST_SENDING_2: begin
          sync_n <= 1'b0;
          sdin   <= 1'b0;
        end
        ST_RAMP: begin
          sync_n <= 1'b0;
          sdin   <= mem_q[bit_pos];
        end
        ST_HOLD_STATE: begin
          sync_n <= 1'b0;
          sdin   <= HOLD_MEM[bit_pos];
        end
        default: begin
          sync_n <= 1'b1;
          sdin   <= 1'b0;
        end
      endcase
    end
  end

  assign cycle_start  = (state_q == ST_INIT);
  assign dout         = dout_q;
  assign state        = state_q;
  assign sample_count = sample_q;

endmodule
