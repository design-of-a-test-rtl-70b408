// Sampler: watches the test device's GPIO byte and time-stamps every change.
//
// At each rising clock edge the GPIO byte is read through a two-flop
// synchroniser and compared with the value read one clock before.  When it
// differs, and capture is enabled and the memory is not yet full, a 40-bit
// sample {io byte, 32-bit tick count} is written to the next memory address.
// The tick counter counts clocks from reset (20 ns per tick at 50 MHz), so the
// interrupt latency is the tick difference of two stored samples.  A sample
// counter detects that all DEPTH words have been written and raises `full`,
// which ends capture until `rearm` clears the counter.
//
// Timing: the tick counter starts at 0 and advances at every clock edge after
// reset.  A pin change that arrives just after the edge that brings the
// counter to k is stamped k+2 (two synchroniser stages), offered on
// wr_en / wr_data after the edge that brings the counter to k+3, and written
// into memory at the next edge.  Every sample has the same delay, so tick
// differences between samples are exact.
//
// Follows the document: one read per clock of the 50 MHz clock, 40-bit words
// of GPIO byte and tick count, 32768 words, a counter that detects the end.
// This design's choices: only changes are stored (the document says both
// that the sampler "registers the state" at every edge and that it stores
// "the changes in logic levels"; storing every clock would fill the memory
// in 655 us, well inside one 2 s interrupt period, so changes are stored),
// the synchroniser, and the enable / rearm controls.
module sampler
  import smu_pkg::*;
#(
  parameter int unsigned DEPTH = 32768
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [IO_W-1:0]          gpio_in,   // asynchronous pins of the test device
  input  logic                     enable,    // capture changes while high
  input  logic                     rearm,     // one-cycle pulse: restart at address 0
  output logic                     wr_en,
  output logic [$clog2(DEPTH)-1:0] wr_addr,
  output sample_t                  wr_data,
  output logic [$clog2(DEPTH):0]   count,     // samples written since the last rearm
  output logic                     full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [IO_W-1:0]   sync1, sync2, prev;
  logic [TICK_W-1:0] ticks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      prev  <= '0;
      ticks <= '0;
    end else begin
      sync1 <= gpio_in;
      sync2 <= sync1;
      prev  <= sync2;
      ticks <= ticks + 1'b1;
    end
  end

  assign full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      count   <= '0;
    end else begin
      wr_en <= 1'b0;
      if (rearm) begin
        count <= '0;
      end else if (enable && !full && (sync2 != prev)) begin
        wr_en      <= 1'b1;
        wr_addr    <= count[AW-1:0];
        wr_data.io <= sync2;
        wr_data.ticks <= ticks;
        count      <= count + 1'b1;
      end
    end
  end

endmodule
