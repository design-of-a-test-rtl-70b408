// Testbench for irq_gen: checks the pulse period and on-time in clock
// cycles, that nothing is generated before start or after stop, and the LEDs.
module tb_irq_gen;
  localparam int unsigned PERIOD = 40;
  localparam int unsigned TON    = 6;

  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic irq, running, led_start, led_stop;
  int checks = 0, failures = 0;

  irq_gen #(.PERIOD_CYCLES(PERIOD), .TON_CYCLES(TON)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // edge timestamps
  longint unsigned cyc = 0, last_rise = 0, last_fall = 0;
  int rises = 0, run_rises = 0, bad_period = 0, bad_ton = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    cyc   <= cyc + 1;
    irq_q <= irq;
    if (irq && !irq_q) begin
      if (run_rises > 0 && (cyc - last_rise) != PERIOD) bad_period++;
      last_rise <= cyc;
      rises <= rises + 1;
      run_rises <= run_rises + 1;
    end else if (!running) run_rises <= 0;
    if (!irq && irq_q && running) begin
      if ((cyc - last_rise) != TON) bad_ton++;
      last_fall <= cyc;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    check(rises == 0 && irq == 0, "no pulse before start");
    check(!led_start && !led_stop, "LEDs off after reset");
    @(negedge clk) start = 1;
    repeat (5) @(negedge clk);   // held like a button
    start = 0;
    check(running && led_start && !led_stop, "running after start");
    repeat (PERIOD * 10) @(posedge clk);
    check(rises >= 10, $sformatf("pulses while running (%0d)", rises));
    check(bad_period == 0, $sformatf("period errors %0d", bad_period));
    check(bad_ton == 0, $sformatf("on-time errors %0d", bad_ton));
    // a second start while running must not restart the phase
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (PERIOD * 3) @(posedge clk);
    check(bad_period == 0, "start while running keeps period");
    // stop in the middle of a pulse
    wait (irq == 1);
    repeat (2) @(negedge clk);
    stop = 1;
    @(negedge clk) stop = 0;
    check(irq == 0 && !running, "stop drops irq at once");
    check(!led_start && led_stop, "stop LED lit");
    begin
      int r0;
      r0 = rises;
      repeat (PERIOD * 4) @(posedge clk);
      check(rises == r0 && irq == 0, "no pulse after stop");
    end
    // restart: first pulse immediately
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(irq == 1, "first pulse follows start");
    check(led_start && !led_stop, "start LED after restart");
    repeat (PERIOD * 3) @(posedge clk);
    check(bad_period == 0 && bad_ton == 0, "timing after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
