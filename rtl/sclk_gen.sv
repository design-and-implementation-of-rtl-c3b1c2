// Serial clock generator for the TVG controller.
//
// Divides the 50 MHz board clock by DIV (default 10) into the 5 MHz serial
// clock SCLK that is sent to the DAC, and produces a one-cycle `step` enable
// on the clk edge at which SCLK rises. The whole controller runs on clk and
// advances one state per `step`, so its outputs change just after SCLK rises
// and are stable at the following SCLK falling edge, where the DAC samples
// its data input. SCLK is registered and runs without pause; its high phase
// is DIV/2 clk cycles (rounded down), its low phase the rest.
//
// The 5 MHz serial clock and the 50 MHz board clock follow the design
// description; deriving SCLK as a registered divide-by-10 with an enable,
// instead of a second clock domain, is this design's choice.
//
// Timing: after reset SCLK is low and the first `step` (and SCLK rise)
// comes DIV clk cycles later; after that one every DIV cycles.
module sclk_gen #(
  parameter int unsigned DIV = 10   // clk cycles per SCLK period, >= 2
) (
  input  logic clk,
  input  logic rst_n,   // synchronous, active low
  output logic sclk,
  output logic step
);

  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);
  localparam logic [CW-1:0] FALL = CW'(DIV / 2 - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      sclk <= 1'b0;
    end else begin
      cnt <= (cnt == LAST) ? '0 : cnt + 1'b1;
      if (cnt == LAST)      sclk <= 1'b1;
      else if (cnt == FALL) sclk <= 1'b0;
    end
  end

  assign step = rst_n && (cnt == LAST);

endmodule
