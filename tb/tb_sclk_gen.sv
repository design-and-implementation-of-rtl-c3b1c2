// Self-checking testbench of sclk_gen: for the default divide-by-10 and for a
// divide-by-4 instance, checks the step period, that step is a single clk
// pulse on the edge where SCLK rises, and SCLK's high and low phase lengths.
`timescale 1ns/1ps
module tb_sclk_gen;

  logic clk = 1'b0;
  logic rst_n;
  always #10 clk = ~clk;   // 50 MHz

  logic sclk10, step10, sclk4, step4;

  sclk_gen dut10 (.clk(clk), .rst_n(rst_n), .sclk(sclk10), .step(step10));
  sclk_gen #(.DIV(4)) dut4 (.clk(clk), .rst_n(rst_n), .sclk(sclk4), .step(step4));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Measures one divider: steps, SCLK phases in clk cycles.
  task automatic watch(input int div, ref logic sclk, ref logic step, input int periods);
    int cyc = 0, last_step = -1, last_rise = -1, last_fall = -1;
    logic sclk_prev = sclk;
    int seen = 0;
    while (seen < periods) begin
      @(posedge clk);
      #1;
      cyc++;
      if (sclk && !sclk_prev) begin
        if (last_rise >= 0) check(cyc - last_rise == div, $sformatf("DIV=%0d SCLK period", div));
        if (last_fall >= 0) check(cyc - last_fall == div - div / 2, $sformatf("DIV=%0d SCLK low phase", div));
        last_rise = cyc;
        seen++;
      end
      if (!sclk && sclk_prev) begin
        check(last_rise < 0 || cyc - last_rise == div / 2, $sformatf("DIV=%0d SCLK high phase", div));
        last_fall = cyc;
      end
      sclk_prev = sclk;
    end
  endtask

  // step must be high exactly in the clk cycle before SCLK rises.
  logic p10, p4;
  always @(posedge clk) begin
    p10 <= step10;
    p4  <= step4;
  end
  always @(posedge clk) if (rst_n) begin
    #2;
    check((sclk10 && !dut10_prev) == p10, "DIV=10 step marks SCLK rise");
    check((sclk4 && !dut4_prev) == p4, "DIV=4 step marks SCLK rise");
  end
  logic dut10_prev, dut4_prev;
  always @(posedge clk) begin
    dut10_prev <= sclk10;
    dut4_prev  <= sclk4;
  end

  int n10 = 0, n4 = 0;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      watch(10, sclk10, step10, 20);
      watch(4, sclk4, step4, 20);
    join
    // count steps in a 400-cycle window, sampled between clk edges
    repeat (400) begin
      @(negedge clk);
      if (step10) n10++;
      if (step4)  n4++;
    end
    check(n10 == 40, $sformatf("DIV=10 steps in 400 clk: %0d", n10));
    check(n4 == 100, $sformatf("DIV=4 steps in 400 clk: %0d", n4));
    // reset holds SCLK low and step off
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(!sclk10 && !step10 && !sclk4 && !step4, "reset state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
