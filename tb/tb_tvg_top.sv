// End-to-end testbench of tvg_top at its default parameters (50 MHz clock,
// 5 MHz SCLK, 5400 samples per cycle). A behavioural model of the serial DAC
// decodes every write from the SCLK/SYNC#/SDIN pins. Over two complete TVG
// cycles (about 199 ms of simulated time) it checks:
//   - every decoded code: sample k of a cycle is 4*(k+1) while k < 3601, then
//     the hold code 14398; power-down bits 00; no aborted write
//   - 5400 writes per cycle, SYNC# low for 16 SCLK periods (3.2 us)
//   - writes 92 SCLK periods (18.4 us) apart, 94 across a cycle restart
//   - cycle starts 496802 SCLK periods (99.3604 ms) apart
//   - the transmit gate opens with each cycle start and lasts 0.1 ms
//   - the final hold voltage is 2.9 V within one LSB
// It counts how often each mechanism occurred (ramp write, hold write, ramp
// to hold switch, cycle restart, transmit gate) and fails if any never did.
`timescale 1ns/1ps
module tb_tvg_top;
  import tvg_pkg::*;

  localparam longint CLK_PER_SCLK = 10;
  localparam longint FRAME_CLK    = 92 * CLK_PER_SCLK;
  localparam longint CYCLE_CLK    = 496802 * CLK_PER_SCLK;
  localparam longint SYNC_LOW_CLK = 16 * CLK_PER_SCLK;
  localparam longint TX_CLK       = 500 * CLK_PER_SCLK;
  localparam int     NSAMP = 5400, RLIM = 3601, STEPV = 4, HOLDV = 14398;

  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz
  logic rst_n = 1'b0;

  logic dac_sync_n, dac_sclk, dac_sdin, tx_pulse, cycle_start;
  dac_code_t dout;
  tvg_state_e state;
  logic [12:0] sample_count;

  tvg_top dut (
    .clk(clk), .rst_n(rst_n), .dac_sync_n(dac_sync_n), .dac_sclk(dac_sclk),
    .dac_sdin(dac_sdin), .tx_pulse(tx_pulse), .cycle_start(cycle_start),
    .dout(dout), .state(state), .sample_count(sample_count));

  logic [13:0] code;
  logic [1:0]  pd;
  int unsigned frames, aborted;
  real vout;
  ad5641_model dac (.sync_n(dac_sync_n), .sclk(dac_sclk), .sdin(dac_sdin),
                    .code(code), .pd(pd), .frames(frames), .aborted(aborted),
                    .vout(vout));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_ramp = 0, n_hold = 0, n_switch = 0, n_restart = 0, n_tx = 0;

  // cycle starts: falling edge of the one-step cycle_start strobe
  longint last_cs = -1;
  int k = 0;                   // write index within the cycle
  int cycles_done = 0;
  bit in_cycle = 0;
  logic cs_prev = 1'b0;
  always @(posedge clk) begin
    #1;
    if (rst_n && cs_prev && !cycle_start) begin
      if (last_cs >= 0) begin
        check(cyc - last_cs == CYCLE_CLK, $sformatf("cycle period %0d clk", cyc - last_cs));
        n_restart++;
      end
      if (in_cycle) begin
        check(k == NSAMP, $sformatf("writes per cycle %0d", k));
        cycles_done++;
      end
      last_cs = cyc;
      k = 0;
      in_cycle = 1;
    end
    cs_prev = cycle_start;
  end

  // transmit gate
  longint tx_rise = -1;
  logic tx_prev = 1'b0;
  always @(posedge clk) begin
    #2;
    if (tx_pulse && !tx_prev) begin
      tx_rise = cyc;
      check(cyc == last_cs, "transmit gate opens with the cycle start");
    end
    if (!tx_pulse && tx_prev) begin
      check(cyc - tx_rise == TX_CLK, $sformatf("transmit gate %0d clk", cyc - tx_rise));
      n_tx++;
    end
    tx_prev = tx_pulse;
  end

  // SYNC# low time
  longint sync_fall = -1;
  always @(negedge dac_sync_n) sync_fall = cyc;
  always @(posedge dac_sync_n) if (sync_fall >= 0)
    check(cyc - sync_fall == SYNC_LOW_CLK, $sformatf("SYNC# low %0d clk", cyc - sync_fall));

  // decoded writes
  longint last_frame = -1;
  bit prev_was_last = 0;
  always @(frames) if (in_cycle) begin
    int exp_code;
    exp_code = (k < RLIM) ? ((k + 1) * STEPV) % 16384 : HOLDV;
    check(int'(code) == exp_code, $sformatf("write %0d code %0d expected %0d", k, code, exp_code));
    check(pd == 2'b00, "power-down bits 00");
    if (last_frame >= 0)
      check(cyc - last_frame == (k == 0 ? FRAME_CLK + 2 * CLK_PER_SCLK : FRAME_CLK),
            $sformatf("write spacing %0d clk at write %0d", cyc - last_frame, k));
    if (k < RLIM) n_ramp++; else n_hold++;
    if (k == RLIM) n_switch++;
    last_frame = cyc;
    k++;
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (cycles_done == 2);
    // a few writes into the third cycle
    repeat (int'(5 * FRAME_CLK)) @(posedge clk);
    check(aborted == 0, $sformatf("aborted writes %0d", aborted));
    check(n_ramp == 2 * RLIM + 5 || n_ramp == 2 * RLIM + 4,
          $sformatf("ramp writes %0d", n_ramp));
    check(n_hold == 2 * (NSAMP - RLIM), $sformatf("hold writes %0d", n_hold));
    $display("mechanisms: ramp writes %0d, hold writes %0d, ramp->hold switches %0d, restarts %0d, transmit gates %0d",
             n_ramp, n_hold, n_switch, n_restart, n_tx);
    check(n_ramp > 0, "ramp write happened");
    check(n_hold > 0, "hold write happened");
    check(n_switch > 0, "ramp to hold switch happened");
    check(n_restart > 0, "cycle restart happened");
    check(n_tx > 0, "transmit gate happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // after the hold writes of the first cycle, the DAC sits at 2.9 V
  initial begin
    wait (n_hold == NSAMP - RLIM);
    #1;
    check(vout > 2.9 - 3.3 / 16384.0 && vout < 2.9 + 3.3 / 16384.0,
          $sformatf("hold voltage %f V", vout));
  end

  initial begin
    repeat (int'(2 * CYCLE_CLK + 20 * FRAME_CLK)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
