// UART receiver: 8 data bits, even parity, one stop bit, LSB first.
//
// The line is synchronised with two flops.  A falling edge in idle starts a
// frame; the start bit is checked again half a bit later, and from there each
// following bit is sampled once per bit period, in the middle of the bit.
// After the stop bit the byte is offered for one clock on `valid` if the
// parity was even and the stop bit high; otherwise `parity_err` or
// `frame_err` pulses instead and the byte is dropped.
//
// CLKS_PER_BIT is the bit period in clocks: 434 for 115200 bit/s at 50 MHz,
// the document's rate and clock.  The serial format (8 bits, even parity, one
// stop bit) is the document's, which elsewhere also shows the PC side set to
// no parity; even parity is used here, in this receiver and in uart_tx.
// Mid-bit sampling and dropping bad bytes are this design's.  `valid` rises
// 10.5 bit periods (plus about three clocks) after the start bit's falling
// edge, in the middle of the stop bit.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       parity_err,
  output logic       frame_err
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e      state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        par_ok;
  logic        rx_s1, rx_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1;
      rx_s2 <= 1'b1;
    end else begin
      rx_s1 <= rxd;
      rx_s2 <= rx_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      clk_cnt    <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      par_ok     <= 1'b0;
      data       <= '0;
      valid      <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      valid      <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          clk_cnt <= '0;
          if (!rx_s2) state <= S_START;
        end
        S_START: begin
          if (clk_cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= rx_s2 ? S_IDLE : S_DATA;   // a glitch, not a start bit
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        S_DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shreg   <= {rx_s2, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= S_PARITY;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        S_PARITY: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            par_ok  <= ((^shreg) == rx_s2);   // even parity over data + parity bit
            state   <= S_STOP;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        S_STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= S_IDLE;
            if (!rx_s2)       frame_err  <= 1'b1;
            else if (!par_ok) parity_err <= 1'b1;
            else begin
              data  <= shreg;
              valid <= 1'b1;
            end
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
