// Testbench for data_storage: random writes and reads against a reference
// array; checks the one-clock read latency and read-before-write on a
// same-address collision.
module tb_data_storage;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned WIDTH = 40;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  data_storage #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  logic [WIDTH-1:0] ref_mem [DEPTH];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i);
      wr_data = {8'($urandom), 32'($urandom)};
      ref_mem[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    // read back in random order, one clock latency
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = AW'($urandom_range(0, DEPTH - 1));
      expect_q = ref_mem[rd_addr];
      @(negedge clk);
      rd_en = 0;
      check(rd_data == expect_q, $sformatf("read %0d: %h expected %h", rd_addr, rd_data, expect_q));
      // rd_data holds while rd_en is low
      @(negedge clk);
      check(rd_data == expect_q, "read data held");
    end
    // write and read the same address together: old word comes back
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      wr_en = 1; rd_en = 1;
      wr_addr = AW'($urandom_range(0, DEPTH - 1)); rd_addr = wr_addr;
      wr_data = {8'($urandom), 32'($urandom)};
      expect_q = ref_mem[rd_addr];
      ref_mem[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      check(rd_data == expect_q, "collision returns old word");
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      check(rd_data == ref_mem[rd_addr], "new word after collision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
