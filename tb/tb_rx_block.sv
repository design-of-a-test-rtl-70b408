// Testbench for rx_block: sends command frames from an independent serial
// model and checks that each valid command raises exactly its request, and
// that frames with a wrong checksum, a wrong ETX, an unknown ID, a parity
// error or leading garbage are handled as specified.
module tb_rx_block;
  localparam int unsigned CPB = 8;

  logic clk = 0, rst_n = 0;
  logic rxd;
  logic req_data, req_end, req_param, bad_frame;
  int checks = 0, failures = 0;

  rx_block #(.CLKS_PER_BIT(CPB)) dut (.*);
  tb_uart_host #(.CLKS_PER_BIT(CPB)) host (.clk, .txd(rxd), .rxd(1'b1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_data = 0, n_end = 0, n_param = 0, n_bad = 0;
  always @(posedge clk) if (rst_n) begin
    n_data  <= n_data  + int'(req_data);
    n_end   <= n_end   + int'(req_end);
    n_param <= n_param + int'(req_param);
    n_bad   <= n_bad   + int'(bad_frame);
  end

  task automatic expect_counts(input int d, input int e, input int p, input int b,
                               input string msg);
    repeat (CPB * 2) @(posedge clk);
    check(n_data == d && n_end == e && n_param == p && n_bad == b,
          $sformatf("%s: data %0d end %0d param %0d bad %0d", msg, n_data, n_end, n_param, n_bad));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (CPB * 4) @(posedge clk);
    host.send_frame(8'h13);          expect_counts(0, 0, 1, 0, "parameter request");
    host.send_frame(8'h11);          expect_counts(1, 0, 1, 0, "data request");
    host.send_frame(8'h12);          expect_counts(1, 1, 1, 0, "end request");
    host.send_frame(8'h11, 1);       expect_counts(1, 1, 1, 1, "bad checksum");
    host.send_frame(8'h11, 0, 8'h04); expect_counts(1, 1, 1, 2, "bad ETX");
    host.send_frame(8'h14);          expect_counts(1, 1, 1, 3, "unknown ID");
    // garbage before the frame is skipped
    host.send_byte(8'h55); host.send_byte(8'hAA);
    host.send_frame(8'h13);          expect_counts(1, 1, 2, 3, "resync on STX");
    // a parity error inside a frame drops it; the next frame is fine
    host.send_byte(8'h02); host.send_byte(8'h11, 1);
    host.send_frame(8'h11);          expect_counts(2, 1, 2, 3, "parity error drops frame");
    // many random valid commands
    for (int i = 0; i < 12; i++) begin
      int d, e, p;
      byte unsigned id;
      d = n_data; e = n_end; p = n_param;
      id = 8'h11 + 8'($urandom_range(0, 2));
      host.send_frame(id);
      expect_counts(d + int'(id == 8'h11), e + int'(id == 8'h12), p + int'(id == 8'h13), 3,
                    $sformatf("random command %02h", id));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
