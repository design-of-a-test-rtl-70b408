// Reception block: receives and validates the PC's Frame of Command.
//
// A uart_rx receives bytes; a small state machine stores them in the frame
// registers STX, ID, ETX and CKS.  Bytes are ignored until an STX (02h)
// arrives, so the block resynchronises on its own after noise.  Once the
// fourth byte is in, the frame is accepted only if ETX is 03h, CKS equals the
// least significant byte of STX + ID + ETX, and ID is one of the three known
// commands; the matching one-clock request is then raised:
//   11h -> req_data  (send one data frame)
//   12h -> req_end   (end of data send)
//   13h -> req_param (send the parameter frame)
// Any other complete frame pulses `bad_frame`.  A byte with a parity or stop
// bit error restarts the search for STX.
//
// The frame layout, codes and checksum are the document's.  Resynchronising
// on STX, dropping frames after a serial error and the bad_frame flag are
// this design's.  The request pulses come one clock after the checksum byte
// leaves uart_rx.
module rx_block
  import smu_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rxd,
  output logic req_data,
  output logic req_end,
  output logic req_param,
  output logic bad_frame
);

  typedef enum logic [1:0] {F_STX, F_ID, F_ETX, F_CKS} field_e;

  logic [7:0] rx_data;
  logic       rx_valid, rx_perr, rx_ferr;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst_n, .rxd,
    .data(rx_data), .valid(rx_valid), .parity_err(rx_perr), .frame_err(rx_ferr)
  );

  field_e     field;
  logic [7:0] reg_stx, reg_id, reg_etx;
  logic [7:0] sum;

  always_comb sum = reg_stx + reg_id + reg_etx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      field     <= F_STX;
      reg_stx   <= '0;
      reg_id    <= '0;
      reg_etx   <= '0;
      req_data  <= 1'b0;
      req_end   <= 1'b0;
      req_param <= 1'b0;
      bad_frame <= 1'b0;
    end else begin
      req_data  <= 1'b0;
      req_end   <= 1'b0;
      req_param <= 1'b0;
      bad_frame <= 1'b0;
      if (rx_perr || rx_ferr) begin
        field <= F_STX;
      end else if (rx_valid) begin
        unique case (field)
          F_STX: if (rx_data == STX) begin
                   reg_stx <= rx_data;
                   field   <= F_ID;
                 end
          F_ID:  begin reg_id  <= rx_data; field <= F_ETX; end
          F_ETX: begin reg_etx <= rx_data; field <= F_CKS; end
          F_CKS: begin
            field <= F_STX;
            if (reg_etx == ETX && rx_data == sum) begin
              unique case (reg_id)
                CMD_DATA_SEND: req_data  <= 1'b1;
                CMD_DATA_END:  req_end   <= 1'b1;
                CMD_PARAM:     req_param <= 1'b1;
                default:       bad_frame <= 1'b1;
              endcase
            end else begin
              bad_frame <= 1'b1;
            end
          end
          default: field <= F_STX;
        endcase
      end
    end
  end

endmodule
