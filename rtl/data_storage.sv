// Data storage: the on-chip sample memory.
//
// DEPTH words of WIDTH bits (32768 x 40 in the document) with one write port
// for the sampler and one read port for the data send block.  Both ports are
// synchronous: a write happens at the clock edge where `wr_en` is high, and
// the word at `rd_addr` appears on `rd_data` one clock after `rd_en`.  A read
// and a write of the same address in the same cycle return the old word.  The
// size is the document's; the two-port organisation and the read latency are
// this design's, chosen to map onto FPGA block RAM.  The memory has no reset;
// words never written read as whatever the RAM powered up with.
module data_storage #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned WIDTH = 40
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
