// Behavioural model of the serial interface of a 14-bit voltage-output DAC
// (AD5641-style), for testbenches only.
//
// A falling SYNC# starts a write. While SYNC# is low, SDIN is shifted in on
// every SCLK falling edge, most significant bit first. On the 16th falling
// edge the word is complete: bits 15:14 are the power-down bits, bits 13:0
// the code, and the output voltage becomes code * VREF / 16384 with a 3.3 V
// supply as reference. SYNC# returning high before 16 bits aborts the write;
// such writes are counted in `aborted`.
module ad5641_model (
  input  logic        sync_n,
  input  logic        sclk,
  input  logic        sdin,
  output logic [13:0] code,
  output logic [1:0]  pd,
  output int unsigned frames,    // completed writes
  output int unsigned aborted,   // writes cut short by SYNC# high
  output real         vout
);

  localparam real VREF = 3.3;

  logic [15:0] shreg;
  int unsigned nbits;

  initial begin
    shreg   = '0;
    nbits   = 0;
    code    = '0;
    pd      = '0;
    frames  = 0;
    aborted = 0;
    vout    = 0.0;
  end

  always @(negedge sclk or posedge sync_n) begin
    if (sync_n) begin
      if (nbits != 0 && nbits < 16) aborted <= aborted + 1;
      nbits <= 0;
    end else if (nbits < 16) begin
      shreg <= {shreg[14:0], sdin};
      nbits <= nbits + 1;
      if (nbits == 15) begin
        code   <= {shreg[12:0], sdin};
        pd     <= shreg[14:13];
        vout   <= real'({shreg[12:0], sdin}) * VREF / 16384.0;
        frames <= frames + 1;
      end
    end
  end

endmodule
