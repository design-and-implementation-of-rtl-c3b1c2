// Self-checking testbench of tvg_fsm at reduced size: STEP=3, HOLD_CODE=100,
// RAMP_LIMIT=11, CYCLE_SAMPLES=20, GAP_LAST=5, with a step enable every 4
// clk cycles. The pins are sampled once per step, two clk cycles after the
// step edge, and each frame is decoded and compared with the expected ramp /
// hold sequence computed here. Also checked, in steps: SYNC# low for 16
// steps, frame-to-frame spacing 18 + GAP_LAST + 1, cycle length
// 1 + CYCLE_SAMPLES*(19 + GAP_LAST) + 1, the one-step cycle_start strobe,
// dout and the state sequence of each frame, and a reset in mid-frame.
`timescale 1ns/1ps
module tb_tvg_fsm;
  import tvg_pkg::*;

  localparam int STEP = 3, HOLD = 100, RLIM = 11, NSAMP = 20, GAP = 5;
  localparam int FRAME_STEPS = 18 + GAP + 1;
  localparam int CYCLE_STEPS = 1 + NSAMP * FRAME_STEPS + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [1:0] c = '0;
  logic step;
  assign step = (c == 2'd3);
  always @(posedge clk) c <= c + 1'b1;

  logic sync_n, sdin, cycle_start;
  dac_code_t dout;
  tvg_state_e state;
  logic [12:0] sample_count;

  tvg_fsm #(.STEP(STEP), .HOLD_CODE(HOLD), .RAMP_LIMIT(RLIM),
            .CYCLE_SAMPLES(NSAMP), .GAP_LAST(GAP)) dut (
    .clk(clk), .rst_n(rst_n), .step(step), .sync_n(sync_n), .sdin(sdin),
    .cycle_start(cycle_start), .dout(dout), .state(state),
    .sample_count(sample_count));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic int expected_code(int k);
    return (k < RLIM) ? ((k + 1) * STEP) % 16384 : HOLD;
  endfunction

  // Per-step observation.
  int stepno = 0;
  int low_len = 0;
  logic [15:0] word;
  int frame_k = 0;            // frame index within the cycle
  int last_frame_start = -1;
  int last_cycle_start = -1;
  int cycles_seen = 0;
  int frames_total = 0, ramp_frames = 0, hold_frames = 0;
  bit in_cycle = 0;
  bit sync_prev = 1;
  bit monitor = 0;

  always @(posedge clk) begin
    if (monitor && c == 2'd2) begin
      stepno++;
      // cycle start strobe lasts one step
      if (cycle_start) begin
        if (last_cycle_start >= 0)
          check(stepno - last_cycle_start == CYCLE_STEPS,
                $sformatf("cycle length %0d", stepno - last_cycle_start));
        if (in_cycle) check(frame_k == NSAMP, $sformatf("frames in cycle %0d", frame_k));
        last_cycle_start = stepno;
        frame_k = 0;
        in_cycle = 1;
        cycles_seen++;
      end
      if (!sync_n) begin
        if (sync_prev) begin
          if (last_frame_start >= 0 && frame_k != 0)
            check(stepno - last_frame_start == FRAME_STEPS,
                  $sformatf("frame spacing %0d", stepno - last_frame_start));
          last_frame_start = stepno;
        end
        word = {word[14:0], sdin};
        low_len++;
      end else if (!sync_prev) begin
        check(low_len == 16, $sformatf("SYNC# low for %0d steps", low_len));
        if (in_cycle) begin
          check(word[15:14] == 2'b00, "power-down bits 00");
          check(int'(word[13:0]) == expected_code(frame_k),
                $sformatf("frame %0d code %0d expected %0d", frame_k, word[13:0], expected_code(frame_k)));
          check(int'(dout) == expected_code(frame_k), "dout matches frame");
          if (frame_k < RLIM) ramp_frames++; else hold_frames++;
          frame_k++;
          frames_total++;
        end
        low_len = 0;
      end
      sync_prev = sync_n;
    end
  end

  // State order inside a frame, checked on step edges.
  tvg_state_e prev_state;
  always @(posedge clk) if (rst_n && step) begin
    #1;
    case (prev_state)
      ST_INIT:       check(state == ST_ADDING, "INIT -> ADDING");
      ST_SENDING_1:  check(state == ST_SENDING_2, "SENDING_1 -> SENDING_2");
      ST_SYNC_HIGH:  check(state == ST_SENDING_3, "SYNC_HIGH -> SENDING_3");
      default: ;
    endcase
    prev_state = state;
  end

  initial begin
    prev_state = ST_INIT;
    word = '0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    monitor = 1;
    // three full cycles and a bit
    repeat (4 * (3 * CYCLE_STEPS + 10)) @(posedge clk);
    check(cycles_seen == 4, $sformatf("cycle starts seen %0d", cycles_seen));
    check(ramp_frames == 3 * RLIM && hold_frames == 3 * (NSAMP - RLIM),
          $sformatf("ramp %0d hold %0d frames", ramp_frames, hold_frames));
    // reset in the middle of a frame: SYNC# must go high and the next
    // cycle must start from the first ramp value again
    wait (state == ST_RAMP);
    monitor = 0;
    @(negedge clk) rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(sync_n == 1'b1 && state == ST_INIT && sample_count == 0, "reset mid-frame");
    @(negedge clk) rst_n = 1'b1;
    in_cycle = 0; last_cycle_start = -1; last_frame_start = -1;
    low_len = 0; sync_prev = 1; frame_k = 0;
    ramp_frames = 0; hold_frames = 0;
    monitor = 1;
    repeat (4 * (CYCLE_STEPS - 5)) @(posedge clk);
    check(ramp_frames == RLIM && hold_frames == NSAMP - RLIM,
          $sformatf("after reset: ramp %0d hold %0d", ramp_frames, hold_frames));
    $display("ramp frames, hold frames, cycles: %0d %0d %0d", ramp_frames, hold_frames, cycles_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
