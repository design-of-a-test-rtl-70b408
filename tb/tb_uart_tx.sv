// Testbench for uart_tx: feeds random bytes through a byte stream with random
// gaps and checks, with an independent serial receiver, the values, the
// parity, the stop bit, the idle-high line and the character spacing of
// 11 bit periods plus one clock when bytes are back to back.
module tb_uart_tx;
  localparam int unsigned CPB = 8;

  logic clk = 0, rst_n = 0;
  logic txd, busy;
  int checks = 0, failures = 0;

  byte_stream_if s (.clk, .rst_n);
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .in(s.dst), .txd, .busy);
  tb_uart_host #(.CLKS_PER_BIT(CPB)) host (.clk, .txd(), .rxd(txd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned sent_q[$];

  task automatic put(input byte unsigned b);
    @(negedge clk);
    s.data = b; s.last = 1'b0; s.valid = 1'b1;
    while (!s.ready) @(negedge clk);
    @(posedge clk);              // taken at this edge
    sent_q.push_back(b);
    #1 s.valid = 1'b0;
  endtask

  initial begin
    s.valid = 0; s.data = '0; s.last = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // let the host's receiver settle on the idle line
    repeat (CPB * 15) @(posedge clk);
    host.rx_q.delete(); host.rx_start_q.delete();
    host.rx_parity_errors = 0; host.rx_frame_errors = 0;
    check(txd == 1'b1 && !busy && s.ready, "line idles high and ready");
    // random gaps
    for (int i = 0; i < 20; i++) begin
      put(8'($urandom));
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    // back to back: valid held high
    for (int i = 0; i < 10; i++) put(8'(i * 29 + 1));
    repeat (CPB * 12) @(posedge clk);
    check(host.rx_q.size() == sent_q.size(), $sformatf("received %0d of %0d", host.rx_q.size(), sent_q.size()));
    check(host.rx_parity_errors == 0 && host.rx_frame_errors == 0, "no parity or stop errors");
    for (int i = 0; i < sent_q.size() && i < host.rx_q.size(); i++)
      check(host.rx_q[i] == sent_q[i], $sformatf("byte %0d: %02h expected %02h", i, host.rx_q[i], sent_q[i]));
    for (int i = 21; i < 30 && i < host.rx_start_q.size(); i++)
      check(host.rx_start_q[i] - host.rx_start_q[i-1] == 64'(11 * CPB + 1),
            $sformatf("spacing %0d", host.rx_start_q[i] - host.rx_start_q[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
