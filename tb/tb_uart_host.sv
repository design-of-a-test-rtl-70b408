// Behavioural serial host for the testbenches: the PC end of the RS232 link.
//
// Sends bytes with start bit, 8 data bits LSB first, even parity and one stop
// bit, CLKS_PER_BIT clocks per bit, and receives the same format on `rxd`,
// pushing every correctly framed byte into `rx_q` together with the clock
// count at which its start bit began.  It is written independently of the
// design's uart_rx / uart_tx so that it can check them.
module tb_uart_host #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic clk,
  output logic txd,
  input  logic rxd
);

  byte unsigned     rx_q[$];
  longint unsigned  rx_start_q[$];
  int               rx_parity_errors = 0;
  int               rx_frame_errors  = 0;
  longint unsigned  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial txd = 1'b1;

  // Send one character; flip_parity / bad_stop inject errors.
  task automatic send_byte(input byte unsigned b, input bit flip_parity = 0,
                           input bit bad_stop = 0);
    logic [10:0] f;
    f = {~bad_stop, (^b) ^ flip_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      txd = f[i];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
    txd = 1'b1;
  endtask

  task automatic send_frame(input byte unsigned id, input bit bad_cks = 0,
                            input byte unsigned etx = 8'h03);
    byte unsigned cks;
    cks = 8'(8'h02 + id + etx) ^ {7'd0, bad_cks};
    send_byte(8'h02);
    send_byte(id);
    send_byte(etx);
    send_byte(cks);
  endtask

  // receiver: a clocked state machine (cheap to simulate) that samples each
  // bit in its middle, counted from the first clock that sees the start bit
  int unsigned     rx_count = 0;      // bytes received so far
  int unsigned     r_cnt = 0;
  int unsigned     r_bit = 0;
  int unsigned     r_state = 0;       // 0 idle, 1 in character, 2 stop tail
  logic [9:0]      r_bits;
  longint unsigned r_t0;
  always @(posedge clk) begin
    unique case (r_state)
      0: if (rxd == 1'b0) begin
           r_t0 = cyc; r_cnt = CLKS_PER_BIT / 2 + CLKS_PER_BIT; r_bit = 0; r_state = 1;
         end
      1: if (r_cnt == 1) begin
           r_bits[r_bit] = rxd;
           r_cnt = CLKS_PER_BIT;
           if (r_bit == 9) begin
             if (r_bits[9] != 1'b1) rx_frame_errors++;
             else if ((^r_bits[7:0]) != r_bits[8]) rx_parity_errors++;
             else begin
               rx_q.push_back(r_bits[7:0]);
               rx_start_q.push_back(r_t0);
               rx_count++;
             end
             r_cnt = CLKS_PER_BIT / 2;
             r_state = 2;
           end else r_bit++;
         end else r_cnt--;
      default: if (r_cnt <= 1) r_state = 0; else r_cnt--;
    endcase
  end

endmodule
