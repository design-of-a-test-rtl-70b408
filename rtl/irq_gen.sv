// Interrupt request generator.
//
// Produces the periodic interrupt request for the test device's EXTINT4 pin:
// a pulse that is high for TON_CYCLES out of every PERIOD_CYCLES clocks.  The
// defaults, 100 ms high every 2 s at 50 MHz, are the document's.  After reset
// the output is low and nothing is generated; a start push-button begins the
// pulse train (the first pulse rises one clock after start is seen) and a
// stop push-button ends it at any time, dropping the output at once.  Two
// LEDs show that generation has been started or stopped.
//
// Interface: start / stop are synchronous, active-high, one or more cycles
// long (a bouncing button only sets or clears the same state again, so no
// debouncer is needed); if both are high, stop wins.  `irq` and `running` are
// registered.  Period, on-time and LEDs follow the document; the start/stop
// precedence and the LED behaviour before the first press are this design's.
module irq_gen #(
  parameter int unsigned PERIOD_CYCLES = 100_000_000,  // 2 s at 50 MHz
  parameter int unsigned TON_CYCLES    = 5_000_000     // 100 ms at 50 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic irq,
  output logic running,
  output logic led_start,
  output logic led_stop
);

  localparam int unsigned CNT_W = $clog2(PERIOD_CYCLES);

  logic [CNT_W-1:0] cnt;
  logic             stopped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      stopped <= 1'b0;
      cnt     <= '0;
      irq     <= 1'b0;
    end else if (stop) begin
      running <= 1'b0;
      stopped <= 1'b1;
      cnt     <= '0;
      irq     <= 1'b0;
    end else if (start && !running) begin
      running <= 1'b1;
      stopped <= 1'b0;
      cnt     <= '0;
      irq     <= 1'b1;
    end else if (running) begin
      if (cnt == CNT_W'(PERIOD_CYCLES - 1)) cnt <= '0;
      else                                  cnt <= cnt + 1'b1;
      // irq follows the count of the cycle being entered
      if (cnt == CNT_W'(PERIOD_CYCLES - 1)) irq <= 1'b1;
      else                                  irq <= (cnt + 1'b1) < CNT_W'(TON_CYCLES);
    end
  end

  assign led_start = running;
  assign led_stop  = stopped;

  initial begin
    assert (TON_CYCLES > 0 && TON_CYCLES < PERIOD_CYCLES)
      else $error("irq_gen: TON_CYCLES must lie between 0 and PERIOD_CYCLES");
  end

endmodule
