// The sampling example of the measurement method: the task pin is high at
// tick 5, the task pin falls at tick 6 and the ISR pin rises at tick 7.  The
// sampler at its default size must store exactly 01_00000005h,
// 00_00000006h and 02_00000007h, and the latency read from the stored ticks
// is (7 - 6) x 20 ns = 20 ns.  The pins are driven two clocks early to
// cover the synchroniser, so the stamps come out at ticks 5, 6 and 7.
module tb_sampler_table1;
  import smu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] gpio_in = '0;
  logic wr_en, full;
  logic [14:0] wr_addr;
  sample_t wr_data;
  logic [15:0] count;
  int checks = 0, failures = 0;

  sampler dut (.clk, .rst_n, .gpio_in, .enable(1'b1), .rearm(1'b0),
               .wr_en, .wr_addr, .wr_data, .count, .full);

  always #10 clk = ~clk;     // 50 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [39:0] stored[$];
  always @(posedge clk) if (rst_n && wr_en) stored.push_back(wr_data);

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] exp[3];
    exp = '{40'h01_00000005, 40'h00_00000006, 40'h02_00000007};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;              // tick counter reads 0 until the next edge
    // after the edge that makes the counter k, a change is stamped k + 2
    repeat (3) @(posedge clk); #1 gpio_in = 8'h01;   // tick 5
    @(posedge clk);            #1 gpio_in = 8'h00;   // tick 6
    @(posedge clk);            #1 gpio_in = 8'h02;   // tick 7
    repeat (8) @(posedge clk);
    check(stored.size() == 3, $sformatf("%0d samples stored", stored.size()));
    for (int i = 0; i < 3 && i < stored.size(); i++)
      check(stored[i] == exp[i], $sformatf("sample %0d = %h, expected %h", i, stored[i], exp[i]));
    if (stored.size() == 3)
      check((stored[2][31:0] - stored[1][31:0]) * 20 == 20, "latency 20 ns");
    check(count == 3 && !full, "three words counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
