// Testbench for uart_rx: sends random bytes from an independent serial
// model and checks the received data, the parity and stop-bit error flags,
// and that valid appears within a fixed number of clocks after the frame.
module tb_uart_rx;
  localparam int unsigned CPB = 16;

  logic clk = 0, rst_n = 0;
  logic rxd;
  logic [7:0] data;
  logic valid, parity_err, frame_err;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  tb_uart_host #(.CLKS_PER_BIT(CPB)) host (.clk, .txd(rxd), .rxd(1'b1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  byte unsigned got_q[$];
  int n_perr = 0, n_ferr = 0;
  longint unsigned last_valid_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (valid) begin got_q.push_back(data); last_valid_cyc = host.cyc; end
    if (parity_err) n_perr++;
    if (frame_err) n_ferr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned b;
    longint unsigned t0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (CPB * 2) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      b = 8'($urandom);
      t0 = host.cyc;
      host.send_byte(b);
      repeat (CPB) @(posedge clk);   // let the stop bit be sampled
      check(got_q.size() == 1 && got_q[0] == b, $sformatf("byte %02h received", b));
      // valid within 10.5 bit periods + sync/register delay of the start edge
      check(got_q.size() == 1 && last_valid_cyc - t0 <= 64'(CPB * 21 / 2 + 4) &&
            last_valid_cyc - t0 >= 64'(CPB * 10), $sformatf("latency %0d", last_valid_cyc - t0));
      void'(got_q.pop_front());
    end
    // back-to-back characters
    for (int i = 0; i < 8; i++) host.send_byte(8'(i * 37));
    repeat (CPB * 2) @(posedge clk);
    check(got_q.size() == 8, "back-to-back bytes");
    for (int i = 0; i < 8 && got_q.size() > 0; i++)
      check(got_q.pop_front() == 8'(i * 37), "back-to-back value");
    got_q.delete();
    // parity error: no valid, parity_err pulse
    host.send_byte(8'h5A, 1);
    repeat (CPB) @(posedge clk);
    check(got_q.size() == 0 && n_perr == 1, "parity error detected");
    // stop bit error
    host.send_byte(8'hA5, 0, 1);
    repeat (CPB * 2) @(posedge clk);
    check(got_q.size() == 0 && n_ferr == 1, "stop bit error detected");
    repeat (CPB * 12) @(posedge clk);
    got_q.delete();
    // receiver recovers
    host.send_byte(8'h3C);
    repeat (CPB) @(posedge clk);
    check(got_q.size() == 1 && got_q[0] == 8'h3C, "recovery after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
