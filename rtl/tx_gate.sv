// Transmit gate generator.
//
// The TVG ramp must start with the transmitted pulse. This block opens a
// transmit gate of TX_STEPS serial-clock periods (500 x 200 ns = 0.1 ms at the
// 5 MHz step rate) at every TVG cycle start, so the transmit pulse repeats at
// the same 10 Hz rate as the gain ramp and is aligned with it.
//
// The 0.1 ms pulse width, the 10 Hz rate and the requirement that the TVG be
// synchronous with the transmission follow the design description; deriving
// the gate from the controller's cycle-start strobe is this design's choice.
//
// Interface and timing: `step` is the clk enable of one SCLK period;
// `cycle_start` is sampled on a step. tx_pulse goes high on the clk edge of
// the step that sees cycle_start and stays high for exactly TX_STEPS steps.
// A cycle start during an open gate restarts the count.
module tx_gate #(
  parameter int unsigned TX_STEPS = 500  // gate length in steps, >= 1
) (
  input  logic clk,
  input  logic rst_n,        // synchronous, active low
  input  logic step,
  input  logic cycle_start,
  output logic tx_pulse
);

  localparam int unsigned CW = $clog2(TX_STEPS + 1);

  logic [CW-1:0] remain;     // steps the gate still stays open

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remain <= '0;
    end else if (step) begin
      if (cycle_start)      remain <= CW'(TX_STEPS);
      else if (remain != 0) remain <= remain - 1'b1;
    end
  end

  assign tx_pulse = (remain != 0);

endmodule
