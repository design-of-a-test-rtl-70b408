// Interrupt waveform at full size: irq_gen with its default parameters and a
// 50 MHz (20 ns) clock.  After start, the test measures the first two
// pulses and checks a period of exactly 2 s (100,000,000 clocks) and a high
// time of exactly 100 ms (5,000,000 clocks), in both clock counts and
// simulated time.
module tb_irq_gen_full;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic irq, running, led_start, led_stop;
  int checks = 0, failures = 0;

  irq_gen dut (.*);

  always #10 clk = ~clk;     // 50 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // edge log, kept by a plain clocked process
  longint unsigned cyc = 0;
  longint unsigned rise_cyc[2], fall_cyc[2];
  realtime         rise_t[2], fall_t[2];
  int n_rise = 0, n_fall = 0;
  logic irq_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc   <= cyc + 1;
    irq_q <= irq;
    if (irq && !irq_q && n_rise < 2) begin
      rise_cyc[n_rise] <= cyc; rise_t[n_rise] <= $realtime; n_rise <= n_rise + 1;
    end
    if (!irq && irq_q && n_fall < 2) begin
      fall_cyc[n_fall] <= cyc; fall_t[n_fall] <= $realtime; n_fall <= n_fall + 1;
    end
  end

  initial begin
    #(64'd2_500_000_000 * 1);     // 2.5 s of simulated time (1 ns units)
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    check(!irq && !led_start && !led_stop, "idle after reset");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (n_rise == 2);
    @(posedge clk);
    check(rise_cyc[1] - rise_cyc[0] == 64'd100_000_000,
          $sformatf("period %0d clocks", rise_cyc[1] - rise_cyc[0]));
    check(fall_cyc[0] - rise_cyc[0] == 64'd5_000_000,
          $sformatf("high time %0d clocks", fall_cyc[0] - rise_cyc[0]));
    check(rise_t[1] - rise_t[0] == 2.0e9, $sformatf("period %0.0f ns", rise_t[1] - rise_t[0]));
    check(fall_t[0] - rise_t[0] == 1.0e8, $sformatf("high time %0.0f ns", fall_t[0] - rise_t[0]));
    check(irq && led_start, "second pulse running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
