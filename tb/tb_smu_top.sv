// End-to-end testbench of the Stimuli Measurement Unit at reduced sizes.
//
// A behavioural test device answers the unit's interrupt pulses with task
// and ISR square waves; a behavioural serial host plays the PC.  The test
// asks for the parameter frame, sends a corrupt command, starts interrupt
// generation with the start button, lets the memory fill, reads the whole
// memory frame by frame, checks every sample against the device's own log
// of pin changes and the interrupt latencies derived from the stored ticks,
// reads past the end (address wrap), stops generation, ends the transfer
// (rewind and re-arm) and captures and reads again.  It counts how often
// each mechanism happened and fails any that never did.
module tb_smu_top;
  import smu_pkg::*;

  localparam longint unsigned CLK_HZ = 1_000_000;
  localparam longint unsigned BAUD   = 100_000;
  localparam int unsigned     CPB    = 10;
  localparam longint unsigned PER_US = 1500;     // 1500 clocks
  localparam longint unsigned TON_US = 150;
  localparam int unsigned     DEPTH  = 64;
  localparam int unsigned     FS     = 8;
  localparam int unsigned     FRAME_BYTES = 1 + FS * SAMPLE_BYTES + 2;

  logic clk = 0, rst_n = 0;
  logic btn_start = 0, btn_stop = 0;
  logic irq_out, uart_rxd, uart_txd, led_start, led_stop, led_full;
  logic [7:0] gpio;
  logic td_enable = 0;
  int checks = 0, failures = 0;

  smu_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .IRQ_PERIOD_US(PER_US), .IRQ_TON_US(TON_US),
            .DEPTH(DEPTH), .FRAME_SAMPLES(FS)) dut (
    .clk, .rst_n, .btn_start, .btn_stop, .irq_out, .gpio_in(gpio),
    .uart_rxd, .uart_txd, .led_start, .led_stop, .led_full);

  tb_uart_host #(.CLKS_PER_BIT(CPB)) host (.clk, .txd(uart_rxd), .rxd(uart_txd));
  tb_test_device #(.TASK_HALF(37), .ISR_HALF(11), .ISR_PULSES(3), .LAT_MIN(3), .LAT_MAX(60))
    td (.clk, .reset_done(rst_n), .enable(td_enable), .irq(irq_out), .gpio);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanisms
  int m_param = 0, m_bad = 0, m_irq = 0, m_isr = 0, m_full = 0, m_frames = 0,
      m_wrap = 0, m_stop = 0, m_rearm = 0, m_latency = 0;

  // interrupt pulse timing, checked only inside one run of generation
  longint unsigned cyc = 0, t_rise = 0;
  logic irq_q = 0;
  int run_rises = 0, bad_irq_timing = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    irq_q <= irq_out;
    if (irq_out && !irq_q) begin
      if (run_rises > 0 && (cyc - t_rise) != PER_US) bad_irq_timing++;
      t_rise <= cyc;
      run_rises <= run_rises + 1;
      m_irq <= m_irq + 1;
    end else if (!led_start) run_rises <= 0;
    if (!irq_out && irq_q && led_start && (cyc - t_rise) != TON_US) bad_irq_timing++;
  end

  initial begin
    #(64'd3_000_000 * 10);   // 3 million clocks
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait until n bytes have arrived at the host, or time out
  task automatic wait_bytes(input int n, input int timeout_cycles, output bit ok);
    // poll once per bit period (clock period is 10 time units)
    int t = 0;
    while (host.rx_q.size() < n && t < timeout_cycles) begin
      #(CPB * 10);
      t += CPB;
    end
    ok = (host.rx_q.size() >= n);
  endtask

  task automatic press(ref logic btn);
    @(negedge clk) btn = 1;
    repeat (6) @(negedge clk);
    btn = 0;
    repeat (4) @(negedge clk);
  endtask

  // read one data frame; check framing and checksum; return its samples
  task automatic read_frame(output sample_t s[FS]);
    bit ok;
    byte unsigned b[$];
    byte unsigned sum = 0;
    host.send_frame(8'h11);
    wait_bytes(FRAME_BYTES, FRAME_BYTES * 12 * CPB + 200, ok);
    check(ok, "data frame arrived");
    for (int i = 0; i < FRAME_BYTES && host.rx_q.size() > 0; i++) b.push_back(host.rx_q.pop_front());
    if (b.size() != FRAME_BYTES) return;
    check(b[0] == 8'h02 && b[FRAME_BYTES-2] == 8'h03, "data frame STX / ETX");
    for (int i = 0; i < FRAME_BYTES - 1; i++) sum += b[i];
    check(sum == b[FRAME_BYTES-1], "data frame checksum");
    for (int k = 0; k < FS; k++) begin
      logic [SAMPLE_W-1:0] w = '0;
      for (int j = 0; j < SAMPLE_BYTES; j++) w = {w[SAMPLE_W-9:0], b[1 + k*SAMPLE_BYTES + j]};
      s[k] = w;
    end
    m_frames++;
  endtask

  // compare stored samples with the device log from index ev0 on
  task automatic check_capture(input sample_t got[$], input int ev0, input int n);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      sample_t e;
      e.io    = td.ev_val_q[ev0 + i];
      e.ticks = 32'(td.ev_edge_q[ev0 + i] + 2);
      if (got[i] != e) begin
        bad++;
        if (bad < 5) $display("FAIL: sample %0d = %h, expected %h", i, got[i], e);
      end
    end
    check(bad == 0, $sformatf("%0d of %0d samples differ", bad, n));
    // interrupt latency as the stored ticks show it: ISR's first edge minus
    // the task's last edge before it
    foreach (td.isr_entry_q[k]) begin
      longint unsigned t_isr = td.isr_entry_q[k] + 2;
      int idx = -1;
      for (int i = 0; i < n; i++) if (64'(got[i].ticks) == t_isr) idx = i;
      if (idx >= 0) begin
        longint unsigned t_task = 0;
        bit found = 0;
        for (int i = idx; i >= 1 && !found; i--)
          if (got[i].io[0] != got[i-1].io[0]) begin t_task = 64'(got[i].ticks); found = 1; end
        if (found) begin
          check(int'(t_isr - t_task) == int'(td.latency_q[k]),
                $sformatf("latency %0d, device used %0d", t_isr - t_task, td.latency_q[k]));
          m_latency++;
        end
        m_isr++;
      end
    end
  endtask

  initial begin
    bit ok;
    sample_t fr[FS];
    sample_t got[$];
    int ev0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (CPB * 15) @(posedge clk);
    host.rx_q.delete(); host.rx_start_q.delete();
    check(!irq_out && !led_start && !led_stop && !led_full, "idle after reset");

    // parameter frame: 02 PAR 03 CKS with PAR = clock in MHz
    host.send_frame(8'h13);
    wait_bytes(4, 4 * 12 * CPB + 100, ok);
    check(ok, "parameter frame arrived");
    if (ok) begin
      byte unsigned p0, p1, p2, p3;
      p0 = host.rx_q.pop_front(); p1 = host.rx_q.pop_front();
      p2 = host.rx_q.pop_front(); p3 = host.rx_q.pop_front();
      check(p0 == 8'h02 && p1 == 8'(CLK_HZ / 1_000_000) && p2 == 8'h03 &&
            p3 == 8'(8'h05 + 8'(CLK_HZ / 1_000_000)), $sformatf("parameter frame %02h %02h %02h %02h", p0, p1, p2, p3));
      m_param++;
    end

    // corrupt command: no answer
    host.send_frame(8'h13, 1);
    wait_bytes(1, 8 * 12 * CPB, ok);
    check(!ok, "corrupt command ignored");
    if (!ok) m_bad++;

    // start interrupt generation, then the device
    press(btn_start);
    check(led_start && !led_stop && irq_out, "start: LED and first pulse");
    ev0 = td.ev_val_q.size();
    td_enable = 1;
    wait (led_full);
    m_full++;
    repeat (PER_US * 2) @(posedge clk);
    check(td.ev_val_q.size() - ev0 > DEPTH, "more changes happened than fit");

    // read the whole memory
    for (int f = 0; f < DEPTH / FS; f++) begin
      read_frame(fr);
      foreach (fr[k]) got.push_back(fr[k]);
    end
    check(got.size() == DEPTH, "whole memory read");
    if (got.size() == DEPTH) check_capture(got, ev0, DEPTH);
    // one more frame wraps to the first words
    read_frame(fr);
    check(fr[0] == got[0] && fr[FS-1] == got[FS-1], "address counter wraps");
    if (fr[0] == got[0]) m_wrap++;
    check(bad_irq_timing == 0, $sformatf("interrupt period / on-time errors %0d", bad_irq_timing));

    // stop
    press(btn_stop);
    td_enable = 0;
    check(!irq_out && !led_start && led_stop, "stop: pulses end, stop LED");
    begin
      int r0;
      r0 = m_irq;
      repeat (PER_US * 2) @(posedge clk);
      check(m_irq == r0, "no pulses after stop");
      if (m_irq == r0) m_stop++;
    end

    // end of data send: rewind and re-arm, then a second capture
    host.send_frame(8'h12);
    repeat (CPB * 20) @(posedge clk);
    check(!led_full, "re-armed after end of data");
    if (!led_full) m_rearm++;
    td.isr_entry_q.delete(); td.latency_q.delete();
    press(btn_start);
    ev0 = td.ev_val_q.size();
    td_enable = 1;
    wait (led_full);
    m_full++;
    got.delete();
    for (int f = 0; f < 2; f++) begin
      read_frame(fr);
      foreach (fr[k]) got.push_back(fr[k]);
    end
    check_capture(got, ev0, 2 * FS);
    press(btn_stop);

    $display("mechanisms: param %0d, bad %0d, irq %0d, isr %0d, latency %0d, full %0d, frames %0d, wrap %0d, stop %0d, rearm %0d",
             m_param, m_bad, m_irq, m_isr, m_latency, m_full, m_frames, m_wrap, m_stop, m_rearm);
    check(m_param > 0 && m_bad > 0 && m_irq > 1 && m_isr > 0 && m_latency > 0 && m_full > 0 &&
          m_frames > 0 && m_wrap > 0 && m_stop > 0 && m_rearm > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
