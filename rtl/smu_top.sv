// Stimuli Measurement Unit: FPGA side of a test bench that measures the
// interrupt latency of a processor board running a real-time OS.
//
// The unit drives a periodic interrupt request into the test device
// (`irq_out`, wired to its EXTINT4 pin) and records, with a 20 ns time base,
// every change of the GPIO byte the test device drives back (`gpio_in`,
// bit 0 = GPIO4 toggled by the running task, bit 1 = GPIO5 toggled by the
// interrupt service routine).  Each change is stored as a 40-bit sample
// {GPIO byte, 32-bit tick count} in a 32768-word memory.  A PC reads the
// memory over an RS232 link (115200 bit/s, 8 data bits, even parity, one stop
// bit) with 4-field command frames; the latency is the tick difference
// between the task's last edge and the ISR's first edge.
//
//   push-buttons -> irq_gen -> irq_out
//   gpio_in -> sampler -> data_storage -> data_send --\
//   uart_rxd -> rx_block --req_param--> param_send ----> tx_block -> uart_txd
//                        --req_data / req_end--> data_send, sampler
//
// Capture runs while interrupt generation runs and stops when the memory is
// full (`led_full`).  Command 11h returns the next 256 samples, 12h rewinds
// the read address and restarts capture, 13h returns the clock parameter.
//
// Interface: `rst_n` is an asynchronous active-low reset; the push-buttons
// are active-high and asynchronous (synchronised here); `gpio_in` and
// `uart_rxd` are asynchronous.  The block structure, sizes, codes and rates
// are the document's; the capture enable, the restart on 12h, the reset and
// the button polarity are this design's choices.
module smu_top
  import smu_pkg::*;
#(
  parameter longint unsigned CLK_HZ        = 50_000_000,
  parameter longint unsigned BAUD          = 115_200,
  parameter longint unsigned IRQ_PERIOD_US = 2_000_000,   // 2 s
  parameter longint unsigned IRQ_TON_US    = 100_000,     // 100 ms
  parameter int unsigned     DEPTH         = 32768,
  parameter int unsigned     FRAME_SAMPLES = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            btn_start,
  input  logic            btn_stop,
  output logic            irq_out,
  input  logic [IO_W-1:0] gpio_in,
  input  logic            uart_rxd,
  output logic            uart_txd,
  output logic            led_start,
  output logic            led_stop,
  output logic            led_full
);

  localparam int unsigned CPB = clks_per_bit(CLK_HZ, BAUD);
  localparam int unsigned PERIOD_CYCLES = int'(CLK_HZ * IRQ_PERIOD_US / 64'd1_000_000);
  localparam int unsigned TON_CYCLES    = int'(CLK_HZ * IRQ_TON_US / 64'd1_000_000);
  localparam logic [7:0]  PAR           = 8'(CLK_HZ / 64'd1_000_000);
  localparam int unsigned AW            = $clog2(DEPTH);

  // ---- push-buttons ------------------------------------------------------
  logic [1:0] start_sync, stop_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_sync <= '0;
      stop_sync  <= '0;
    end else begin
      start_sync <= {start_sync[0], btn_start};
      stop_sync  <= {stop_sync[0],  btn_stop};
    end
  end

  // ---- interrupt request generation --------------------------------------
  logic running;
  irq_gen #(.PERIOD_CYCLES(PERIOD_CYCLES), .TON_CYCLES(TON_CYCLES)) u_irq_gen (
    .clk, .rst_n, .start(start_sync[1]), .stop(stop_sync[1]),
    .irq(irq_out), .running, .led_start, .led_stop
  );

  // ---- command reception -------------------------------------------------
  logic req_data, req_end, req_param;
  rx_block #(.CLKS_PER_BIT(CPB)) u_rx_block (
    .clk, .rst_n, .rxd(uart_rxd),
    .req_data, .req_end, .req_param, .bad_frame()
  );

  // ---- sampler and data storage ------------------------------------------
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  sample_t       wr_data;
  logic          full;

  sampler #(.DEPTH(DEPTH)) u_sampler (
    .clk, .rst_n, .gpio_in, .enable(running), .rearm(req_end),
    .wr_en, .wr_addr, .wr_data, .count(), .full
  );

  logic                rd_en;
  logic [AW-1:0]       rd_addr;
  logic [SAMPLE_W-1:0] rd_data;

  data_storage #(.DEPTH(DEPTH), .WIDTH(SAMPLE_W)) u_data_storage (
    .clk, .wr_en, .wr_addr, .wr_data(wr_data), .rd_en, .rd_addr, .rd_data
  );

  assign led_full = full;

  // ---- frame builders and transmission -----------------------------------
  byte_stream_if par_s (.clk, .rst_n);
  byte_stream_if dat_s (.clk, .rst_n);

  param_send #(.PAR(PAR)) u_param_send (
    .clk, .rst_n, .req(req_param), .out(par_s.src), .busy()
  );

  data_send #(.DEPTH(DEPTH), .FRAME_SAMPLES(FRAME_SAMPLES)) u_data_send (
    .clk, .rst_n, .req(req_data), .rewind(req_end),
    .rd_en, .rd_addr, .rd_data, .out(dat_s.src), .busy()
  );

  tx_block #(.CLKS_PER_BIT(CPB)) u_tx_block (
    .clk, .rst_n, .par(par_s.dst), .dat(dat_s.dst), .txd(uart_txd), .tx_busy()
  );

endmodule
