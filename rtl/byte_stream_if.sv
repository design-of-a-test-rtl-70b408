// Byte stream between the frame builders (parameter send, data send) and the
// transmission block.
//
// The sender holds `data` and `last` steady with `valid` high until the
// receiver takes the byte with `ready` high on a clock edge.  `last` marks the
// final byte (the checksum) of a frame, which lets the transmission block keep
// one source selected for a whole frame.  The handshake is this design's own;
// the document only speaks of a transmission request and enable signal.
interface byte_stream_if (input logic clk, input logic rst_n);
  logic [7:0] data;
  logic       last;
  logic       valid;
  logic       ready;

  modport src (output data, output last, output valid, input ready);
  modport dst (input data, input last, input valid, output ready);

  // A byte offered must stay offered, unchanged, until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            valid && !ready |=> valid && $stable(data) && $stable(last))
    else $error("byte_stream_if: byte withdrawn or changed before it was taken");
endinterface
