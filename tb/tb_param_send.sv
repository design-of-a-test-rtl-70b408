// Testbench for param_send: takes frames with a randomly stalling sink and
// checks the four bytes 02h, PAR, 03h and their checksum, the `last` marker,
// the byte-stream hold rule and that a request while busy is ignored.
module tb_param_send;
  logic clk = 0, rst_n = 0, req = 0, busy;
  int checks = 0, failures = 0;

  byte_stream_if s (.clk, .rst_n);
  param_send dut (.clk, .rst_n, .req, .out(s.src), .busy);

  always #5 clk = ~clk;

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
  always @(negedge clk) s.ready = ($urandom_range(0, 3) != 0);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned exp[4];
    exp = '{8'h02, 8'h32, 8'h03, 8'h37};
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(got_q.size() == 0 && !busy, "silent without request");
    for (int f = 0; f < 6; f++) begin
      @(negedge clk) req = 1;
      @(negedge clk) req = 0;
      // a second request during the frame is ignored
      @(negedge clk) req = 1;
      @(negedge clk) req = 0;
      wait (!busy);
      repeat (5) @(posedge clk);
      check(got_q.size() == 4, $sformatf("frame %0d has %0d bytes", f, got_q.size()));
      for (int i = 0; i < 4 && got_q.size() > 0; i++) begin
        byte unsigned b;
        bit l;
        b = got_q.pop_front();
        l = last_q.pop_front();
        check(b == exp[i], $sformatf("byte %0d: %02h expected %02h", i, b, exp[i]));
        check(l == (i == 3), "last marks the checksum");
      end
      got_q.delete(); last_q.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
