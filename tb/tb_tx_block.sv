// Testbench for tx_block: two byte-stream sources offer frames, sometimes at
// the same time; an independent serial receiver checks that every frame
// arrives whole, never interleaved with the other, parameter frame first
// when both ask together, and that the line carries nothing else.
module tb_tx_block;
  localparam int unsigned CPB = 4;

  logic clk = 0, rst_n = 0;
  logic txd, tx_busy;
  int checks = 0, failures = 0;

  byte_stream_if par (.clk, .rst_n);
  byte_stream_if dat (.clk, .rst_n);
  tx_block #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .par(par.dst), .dat(dat.dst), .txd, .tx_busy);
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

  // parameter-like frames are bytes 8'hA0 + i, data-like frames 8'h10 + i
  task automatic send_par(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      par.valid = 1; par.data = 8'(8'hA0 + i); par.last = (i == n - 1);
      #1;   // let the grant logic see the request
      while (!par.ready) @(negedge clk);
      @(posedge clk);
      #1 par.valid = 0;
    end
  endtask
  task automatic send_dat(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      dat.valid = 1; dat.data = 8'(8'h10 + i); dat.last = (i == n - 1);
      #1;
      while (!dat.ready) @(negedge clk);
      @(posedge clk);
      #1 dat.valid = 0;
    end
  endtask

  task automatic expect_frame(inout int pos, input byte unsigned base, input int n,
                              input string name);
    for (int i = 0; i < n; i++) begin
      check(pos < host.rx_q.size() && host.rx_q[pos] == 8'(base + i),
            $sformatf("%s byte %0d", name, i));
      pos++;
    end
  endtask

  initial begin
    int pos;
    par.valid = 0; par.data = 0; par.last = 0;
    dat.valid = 0; dat.data = 0; dat.last = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (CPB * 15) @(posedge clk);
    host.rx_q.delete(); host.rx_start_q.delete();
    host.rx_parity_errors = 0; host.rx_frame_errors = 0;
    // both at once, three rounds
    for (int r = 0; r < 3; r++)
      fork
        send_par(4);
        send_dat(9);
      join
    // data alone, parameter arriving in the middle of it
    fork
      send_dat(12);
      begin repeat (CPB * 30) @(posedge clk); send_par(4); end
    join
    repeat (CPB * 14) @(posedge clk);
    pos = 0;
    for (int r = 0; r < 3; r++) begin
      expect_frame(pos, 8'hA0, 4, "parameter frame");
      expect_frame(pos, 8'h10, 9, "data frame");
    end
    expect_frame(pos, 8'h10, 12, "long data frame");
    expect_frame(pos, 8'hA0, 4, "parameter frame after data");
    check(host.rx_q.size() == pos, $sformatf("%0d bytes on the line, expected %0d", host.rx_q.size(), pos));
    check(host.rx_parity_errors == 0 && host.rx_frame_errors == 0, "clean serial line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
