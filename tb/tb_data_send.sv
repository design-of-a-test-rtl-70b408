// Testbench for data_send: a reference memory with one clock of read latency
// holds random samples; frames are taken by a randomly stalling sink and
// checked byte by byte (STX, samples MSB first, ETX, checksum), including the
// address counter walking frame by frame, wrapping, and rewinding.
module tb_data_send;
  import smu_pkg::*;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned FS    = 4;     // samples per frame
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, req = 0, rewind = 0, busy;
  logic rd_en;
  logic [AW-1:0] rd_addr;
  logic [SAMPLE_W-1:0] rd_data;
  int checks = 0, failures = 0;

  byte_stream_if s (.clk, .rst_n);
  data_send #(.DEPTH(DEPTH), .FRAME_SAMPLES(FS)) dut (
    .clk, .rst_n, .req, .rewind, .rd_en, .rd_addr, .rd_data, .out(s.src), .busy);

  always #5 clk = ~clk;

  logic [SAMPLE_W-1:0] mem [DEPTH];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  byte unsigned got_q[$];
  bit           last_q[$];
  always @(posedge clk) if (rst_n && s.valid && s.ready) begin
    got_q.push_back(s.data);
    last_q.push_back(s.last);
  end
  always @(negedge clk) s.ready = ($urandom_range(0, 2) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request one frame and check it against words first .. first+FS-1
  task automatic frame(input int first);
    byte unsigned exp[$];
    byte unsigned sum;
    @(negedge clk) req = 1;
    @(negedge clk) req = 0;
    wait (!busy);
    repeat (3) @(posedge clk);
    exp.push_back(8'h02);
    for (int i = 0; i < FS; i++) begin
      logic [SAMPLE_W-1:0] w;
      w = mem[(first + i) % DEPTH];
      for (int b = SAMPLE_BYTES - 1; b >= 0; b--) exp.push_back(w[b*8 +: 8]);
    end
    exp.push_back(8'h03);
    sum = 0;
    foreach (exp[i]) sum += exp[i];
    exp.push_back(sum);
    check(got_q.size() == exp.size(), $sformatf("frame at %0d: %0d bytes, expected %0d",
                                                first, got_q.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got_q.size(); i++) begin
      check(got_q[i] == exp[i], $sformatf("frame at %0d byte %0d: %02h expected %02h",
                                          first, i, got_q[i], exp[i]));
      check(last_q[i] == (i == exp.size() - 1), "last only on checksum");
    end
    got_q.delete(); last_q.delete();
  endtask

  initial begin
    foreach (mem[i]) mem[i] = {8'($urandom), 32'($urandom)};
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(got_q.size() == 0 && !busy, "silent without request");
    for (int f = 0; f < DEPTH / FS; f++) frame(f * FS);
    frame(0);                    // wrapped to the start
    frame(FS);
    @(negedge clk) rewind = 1;
    @(negedge clk) rewind = 0;
    frame(0);                    // rewound
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
