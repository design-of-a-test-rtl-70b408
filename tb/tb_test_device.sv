// Behavioural model of the test device: a processor board running a
// real-time OS, seen only through its pins.
//
// While enabled, a "task" toggles GPIO4 (gpio[0]) every TASK_HALF clocks.  A
// rising edge on the external interrupt pin is answered after a random
// latency of LAT_MIN..LAT_MAX clocks, during which the task keeps running;
// the "ISR" then toggles GPIO5 (gpio[1]) high and low ISR_PULSES times,
// ISR_HALF clocks per level, with interrupts masked, and returns to the task.
// Every pin change is applied at a falling clock edge and logged
// with the number of clock edges seen since `reset_done`, so a testbench can
// predict the samples the unit under test stores.  The latency the model
// chose for each interrupt, measured from the task's last edge to the ISR's
// first edge (how the captured data shows it), is logged as well.
module tb_test_device #(
  parameter int unsigned TASK_HALF  = 37,
  parameter int unsigned ISR_HALF   = 11,
  parameter int unsigned ISR_PULSES = 3,
  parameter int unsigned LAT_MIN    = 5,
  parameter int unsigned LAT_MAX    = 40
) (
  input  logic       clk,
  input  logic       reset_done,
  input  logic       enable,
  input  logic       irq,
  output logic [7:0] gpio
);

  longint unsigned edges = 0;
  always @(posedge clk) if (reset_done) edges <= edges + 1;

  // log of changes: {new value, edge count when it was applied}
  logic [7:0]      ev_val_q[$];
  longint unsigned ev_edge_q[$];
  int unsigned     latency_q[$];    // task-edge to ISR-edge, per interrupt
  longint unsigned isr_entry_q[$];  // edge count of each ISR's first edge
  int unsigned     irq_seen = 0;
  longint unsigned last_task_edge = 0;

  initial gpio = 8'h00;

  task automatic set_pins(input logic [7:0] v);
    if (v != gpio) begin
      ev_val_q.push_back(v);
      ev_edge_q.push_back(edges);
      gpio = v;
    end
  endtask

  initial begin
    int unsigned task_cnt;
    int unsigned wait_lat;
    bit          pending;
    logic        irq_prev;
    task_cnt = 0; wait_lat = 0; pending = 0; irq_prev = 1'b0;
    wait (enable);
    forever begin
      @(negedge clk);
      if (!enable) begin irq_prev = 1'b0; wait (enable); continue; end
      // task
      task_cnt++;
      if (task_cnt == TASK_HALF) begin
        task_cnt = 0;
        set_pins(gpio ^ 8'h01);
        last_task_edge = edges;
      end
      // interrupt pin
      if (irq && !irq_prev && !pending) begin
        pending  = 1;
        wait_lat = $urandom_range(LAT_MIN, LAT_MAX);
        irq_seen++;
      end
      irq_prev = irq;
      if (pending) begin
        if (wait_lat == 0) begin
          pending = 0;
          // interrupt service routine, interrupts masked
          latency_q.push_back(int'(edges - last_task_edge));
          isr_entry_q.push_back(edges);
          for (int p = 0; p < ISR_PULSES; p++) begin
            set_pins(gpio | 8'h02);
            repeat (ISR_HALF) @(negedge clk);
            set_pins(gpio & ~8'h02);
            repeat (ISR_HALF) @(negedge clk);
          end
          irq_prev = irq;
          task_cnt = 0;
        end else wait_lat--;
      end
    end
  end

endmodule
