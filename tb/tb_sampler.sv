// Testbench for sampler: drives random GPIO changes and checks that exactly
// the changes seen while enabled are written, in order, at consecutive
// addresses, each with the tick count predicted from the synchroniser delay;
// that capture stops at DEPTH samples (full) and restarts on rearm.
module tb_sampler;
  import smu_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH);
  // A change applied just after clock edge k (tick counter reads k after
  // that edge) is stamped with tick k + 2.
  localparam int unsigned STAMP_DELAY = 2;

  logic clk = 0, rst_n = 0;
  logic [7:0] gpio_in = '0;
  logic enable = 0, rearm = 0;
  logic wr_en, full;
  logic [AW-1:0] wr_addr;
  sample_t wr_data;
  logic [AW:0] count;
  int checks = 0, failures = 0;

  sampler #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // tick reference: edges counted since reset release
  longint unsigned edges = 0;
  always @(posedge clk) if (rst_n) edges <= edges + 1;

  sample_t exp_q[$];
  int      n_writes = 0;
  logic [AW-1:0] exp_addr = '0;

  always @(posedge clk) if (rst_n && wr_en) begin
    sample_t e;
    n_writes++;
    if (exp_q.size() == 0) begin
      checks++; failures++;
      $display("FAIL: unexpected write %h", wr_data);
    end else begin
      e = exp_q.pop_front();
      check(wr_data == e, $sformatf("sample %h expected %h", wr_data, e));
      check(wr_addr == exp_addr, $sformatf("addr %0d expected %0d", wr_addr, exp_addr));
    end
    exp_addr <= exp_addr + 1'b1;
  end

  // change the pins right after a clock edge; record the expected sample if
  // it will be captured
  task automatic apply(input logic [7:0] v, input bit captured);
    @(posedge clk);
    #1;
    if (v != gpio_in && captured)
      exp_q.push_back('{io: v, ticks: 32'(edges + STAMP_DELAY)});
    gpio_in = v;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // disabled: changes are not stored
    for (int i = 0; i < 5; i++) begin
      apply(8'(i + 1), 0);
      repeat (4) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    check(n_writes == 0 && count == 0, "nothing stored while disabled");
    @(posedge clk) #1 enable = 1;
    // a run of changes, some one clock apart, some far apart, some no-ops
    for (int i = 0; i < DEPTH; i++) begin
      v = (i % 3 == 2) ? gpio_in : 8'($urandom_range(0, 3) ^ (i & 1));
      if (v == gpio_in) v = gpio_in ^ 8'h01;
      apply(v, 1);
      repeat ($urandom_range(0, 6)) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    check(full && count == DEPTH, $sformatf("full after DEPTH samples (count %0d)", count));
    check(exp_q.size() == 0, "all expected samples written");
    // further changes are dropped once full
    for (int i = 0; i < 4; i++) begin
      apply(gpio_in ^ 8'h02, 0);
      repeat (3) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    check(n_writes == DEPTH, $sformatf("no write after full (%0d)", n_writes));
    // rearm: capture restarts at address 0
    @(posedge clk) #1 rearm = 1;
    @(posedge clk) #1 rearm = 0;
    check(!full && count == 0, "rearm clears the counter");
    exp_addr = '0;
    for (int i = 0; i < 5; i++) begin
      apply(gpio_in ^ 8'h03, 1);
      repeat (2) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    check(exp_q.size() == 0 && count == 5, "capture after rearm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
