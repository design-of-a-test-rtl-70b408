// Parameter send: builds the 4-byte Parameter Frame.
//
// On a one-clock `req` while idle the block offers, in order, STX (02h), the
// parameter byte PAR, ETX (03h) and the checksum, the least significant byte
// of the sum of the first three.  PAR is the clock frequency in MHz, 32h for
// the document's 50 MHz.  The checksum is accumulated from the bytes as they
// are sent.  A request that arrives while a frame is being sent is ignored.
//
// Interface: byte stream source (valid / ready, `last` on the checksum); the
// first byte is offered the clock after `req`.  Frame contents are the
// document's; ignoring requests while busy is this design's.
module param_send
  import smu_pkg::*;
#(
  parameter logic [7:0] PAR = PAR_50MHZ
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  byte_stream_if.src out,
  output logic       busy
);

  typedef enum logic [2:0] {P_IDLE, P_STX, P_PAR, P_ETX, P_CKS} pstate_e;

  pstate_e    state;
  logic [7:0] sum;

  assign busy = (state != P_IDLE);

  always_comb begin
    out.valid = busy;
    out.last  = (state == P_CKS);
    unique case (state)
      P_STX:   out.data = STX;
      P_PAR:   out.data = PAR;
      P_ETX:   out.data = ETX;
      P_CKS:   out.data = sum;
      default: out.data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      sum   <= '0;
    end else if (state == P_IDLE) begin
      sum <= '0;
      if (req) state <= P_STX;
    end else if (out.ready) begin
      sum <= sum + out.data;
      unique case (state)
        P_STX:   state <= P_PAR;
        P_PAR:   state <= P_ETX;
        P_ETX:   state <= P_CKS;
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
