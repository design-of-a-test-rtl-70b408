// Data send: builds the Data Frame from the sample memory.
//
// On a one-clock `req` while idle the block sends STX (02h), then
// FRAME_SAMPLES samples of 5 bytes each (256 x 5 bytes by default), then
// ETX (03h) and a checksum byte that is the least significant byte of the sum
// of every byte before it.  The samples are read from the memory at an
// address counter that starts at 0 and advances by one per sample, so
// successive requests walk through the memory frame by frame (128 frames for
// 32768 words); it wraps after the last word.  `rewind` (the end-of-data
// command) returns the counter to 0.  Each 40-bit sample goes out most
// significant byte first: the GPIO byte, then the tick count from its top
// byte down.
//
// Timing: the memory read is issued one clock before a sample's first byte
// is needed (the memory has one clock of read latency), so the frame is
// paced only by the transmitter.  Requests while busy are ignored.
//
// Frame layout, sample count per frame and the address counter are the
// document's; the byte order inside a sample, the wrap and the rewind are
// this design's.
module data_send
  import smu_pkg::*;
#(
  parameter int unsigned DEPTH         = 32768,
  parameter int unsigned FRAME_SAMPLES = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     rewind,
  // sample memory read port
  output logic                     rd_en,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  input  logic [SAMPLE_W-1:0]      rd_data,
  byte_stream_if.src               out,
  output logic                     busy
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned NW = $clog2(FRAME_SAMPLES + 1);

  typedef enum logic [2:0] {D_IDLE, D_STX, D_READ, D_LOAD, D_BYTES, D_ETX, D_CKS} dstate_e;

  dstate_e       state;
  logic [AW-1:0] addr;
  logic [NW-1:0] n_sent;       // samples fully sent in this frame
  logic [2:0]    byte_idx;     // byte of the current sample, 0 = GPIO byte
  logic [SAMPLE_W-1:0] word;
  logic [7:0]    sum;

  assign busy    = (state != D_IDLE);
  assign rd_addr = addr;
  assign rd_en   = (state == D_READ);

  always_comb begin
    out.valid = (state == D_STX) || (state == D_BYTES) || (state == D_ETX) || (state == D_CKS);
    out.last  = (state == D_CKS);
    unique case (state)
      D_STX:   out.data = STX;
      D_BYTES: out.data = word[SAMPLE_W-1 -: 8];
      D_ETX:   out.data = ETX;
      D_CKS:   out.data = sum;
      default: out.data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= D_IDLE;
      addr     <= '0;
      n_sent   <= '0;
      byte_idx <= '0;
      word     <= '0;
      sum      <= '0;
    end else begin
      if (out.valid && out.ready) sum <= sum + out.data;
      unique case (state)
        D_IDLE: begin
          sum    <= '0;
          n_sent <= '0;
          if (rewind)   addr  <= '0;
          else if (req) state <= D_STX;
        end
        D_STX:   if (out.ready) state <= D_READ;
        D_READ:  state <= D_LOAD;
        D_LOAD: begin
          word     <= rd_data;
          byte_idx <= '0;
          addr     <= addr + 1'b1;
          state    <= D_BYTES;
        end
        D_BYTES: if (out.ready) begin
          word <= {word[SAMPLE_W-9:0], 8'h00};
          if (byte_idx == 3'(SAMPLE_BYTES - 1)) begin
            n_sent <= n_sent + 1'b1;
            state  <= (n_sent == NW'(FRAME_SAMPLES - 1)) ? D_ETX : D_READ;
          end else begin
            byte_idx <= byte_idx + 1'b1;
          end
        end
        D_ETX:   if (out.ready) state <= D_CKS;
        D_CKS:   if (out.ready) state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
