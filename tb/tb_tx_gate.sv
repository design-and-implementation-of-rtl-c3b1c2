// Self-checking testbench of tx_gate with TX_STEPS=7 and a step enable every
// 3 clk cycles: the gate must rise on the step edge that sees cycle_start,
// stay high for exactly 7 steps (21 clk cycles), ignore cycle_start between
// steps, and restart its count when a cycle start arrives while it is open.
`timescale 1ns/1ps
module tb_tx_gate;

  localparam int N = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [1:0] c = '0;
  logic step;
  always @(posedge clk) c <= (c == 2'd2) ? 2'd0 : c + 1'b1;
  assign step = (c == 2'd2);
  logic cycle_start = 1'b0;
  logic tx_pulse;

  tx_gate #(.TX_STEPS(N)) dut (.clk(clk), .rst_n(rst_n), .step(step),
                               .cycle_start(cycle_start), .tx_pulse(tx_pulse));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Measure the length of high phases in clk cycles.
  int hi_len = 0;
  int lengths[$];
  always @(posedge clk) begin
    #1;
    if (tx_pulse) hi_len++;
    else if (hi_len != 0) begin
      lengths.push_back(hi_len);
      hi_len = 0;
    end
  end

  // Raise cycle_start for the step edge only.
  task automatic pulse_start();
    @(negedge clk);
    while (!step) @(negedge clk);
    cycle_start = 1'b1;
    @(negedge clk) cycle_start = 1'b0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (6) @(posedge clk);
    #1 check(!tx_pulse, "closed after reset");
    // 1: a single gate
    pulse_start();
    #1 check(tx_pulse, "gate opens on the step edge");
    repeat (40) @(posedge clk);
    // 2: cycle_start high away from a step is ignored
    @(negedge clk);
    while (step) @(negedge clk);
    cycle_start = 1'b1;
    @(negedge clk) cycle_start = 1'b0;
    repeat (10) @(posedge clk);
    #1 check(!tx_pulse, "no gate without a step");
    // 3: restart in mid-gate: 3 steps then a fresh 7
    pulse_start();
    repeat (8) @(posedge clk);
    pulse_start();
    repeat (40) @(posedge clk);
    check(lengths.size() == 2, $sformatf("number of gates %0d", lengths.size()));
    if (lengths.size() == 2) begin
      check(lengths[0] == 3 * N, $sformatf("gate length %0d", lengths[0]));
      check(lengths[1] == 3 * 3 + 3 * N, $sformatf("restarted gate length %0d", lengths[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
