// UART transmitter: 8 data bits, even parity, one stop bit, LSB first.
//
// Takes one byte at a time from a byte stream (valid / ready) and shifts out
// start bit, eight data bits, the even-parity bit and a stop bit, each
// CLKS_PER_BIT clocks long (434 = 115200 bit/s at 50 MHz).  The line idles
// high.  `ready` is high only while the transmitter is idle, so a byte is
// sent only when a source requests transmission.  A new byte can be taken in
// the clock after the stop bit ends, so back-to-back characters start
// 11 * CLKS_PER_BIT + 1 clocks apart.  The serial format is the document's, shared with the
// receiver; the stream handshake is this design's.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic         clk,
  input  logic         rst_n,
  byte_stream_if.dst   in,
  output logic         txd,
  output logic         busy
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;     // stop, parity, data[7:0]; sent LSB first after the start bit
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  assign busy     = (bits_left != 0);
  assign in.ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      txd       <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (in.valid) begin
        frame     <= {1'b1, ^in.data, in.data};
        txd       <= 1'b0;              // start bit goes out at once
        bits_left <= 4'd11;
        clk_cnt   <= '0;
      end
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      bits_left <= bits_left - 1'b1;
      frame     <= {1'b1, frame[9:1]};
      txd       <= frame[0];
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end

endmodule
