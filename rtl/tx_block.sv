// Transmission block: sends either the parameter frame or the data frame.
//
// Two byte-stream sources, the parameter send block (port `par`) and the
// data send block (port `dat`), share one uart_tx.  When idle the block
// grants the first source that offers a byte, parameter frames first if both
// do, and keeps that grant until the source's `last` byte (the checksum) has
// been taken, so frames are never interleaved.  The uart_tx only takes a byte
// when the granted source requests transmission.
//
// That there is one transmitter fed by either frame builder is the
// document's; the arbitration rule is this design's.  Selection adds no
// clock: a granted byte reaches uart_tx in the same cycle.
module tx_block #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  byte_stream_if.dst par,
  byte_stream_if.dst dat,
  output logic       txd,
  output logic       tx_busy
);

  typedef enum logic [1:0] {G_NONE, G_PAR, G_DAT} grant_e;

  grant_e grant, sel;

  byte_stream_if u_line (.clk, .rst_n);

  // current selection: the held grant, or a fresh one when idle
  always_comb begin
    if (grant != G_NONE) sel = grant;
    else if (par.valid)  sel = G_PAR;
    else if (dat.valid)  sel = G_DAT;
    else                 sel = G_NONE;
  end

  always_comb begin
    u_line.valid = 1'b0;
    u_line.data  = '0;
    u_line.last  = 1'b0;
    par.ready    = 1'b0;
    dat.ready    = 1'b0;
    unique case (sel)
      G_PAR: begin
        u_line.valid = par.valid;
        u_line.data  = par.data;
        u_line.last  = par.last;
        par.ready    = u_line.ready;
      end
      G_DAT: begin
        u_line.valid = dat.valid;
        u_line.data  = dat.data;
        u_line.last  = dat.last;
        dat.ready    = u_line.ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grant <= G_NONE;
    else if (u_line.valid && u_line.ready) grant <= u_line.last ? G_NONE : sel;
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .rst_n, .in(u_line.dst), .txd, .busy(tx_busy)
  );

endmodule
