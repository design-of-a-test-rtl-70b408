// Full-size testbench of the Stimuli Measurement Unit: every parameter at
// its default (50 MHz clock, 115200 bit/s, 2 s / 100 ms interrupt pulses,
// 32768-word memory, 256 samples per data frame).
//
// One complete measurement: the parameter frame is requested and checked
// (02h 32h 03h 37h), interrupt generation is started, the behavioural test
// device answers the first interrupt while its task toggles GPIO4 until the
// memory is full (all 32768 words), and the PC side then reads data frames
// and checks each sample against the device's log, plus the interrupt
// latency the stored ticks show.  READ_FRAMES sets how many of the 128
// frames are read; at 32 the run is about 200 million clocks.  The end-of-
// data command then rewinds the read address, the first frame is read again,
// and generation is stopped.
module tb_smu_top_full;
  import smu_pkg::*;

  localparam longint unsigned CLK_HZ = 50_000_000;
  localparam int unsigned     CPB    = 434;           // 115200 bit/s at 50 MHz
  localparam longint unsigned PER_US = 100_000_000;   // period in clocks (2 s)
  localparam longint unsigned TON_US = 5_000_000;     // on-time in clocks (100 ms)
  localparam int unsigned     DEPTH  = 32768;
  localparam int unsigned     FS     = 256;
  // Frames read back.  All 128 (the whole memory) take about 785 million
  // clocks, close to ten minutes of simulation; 32 frames (8192 samples, a
  // quarter of the memory) keep the run near three minutes.
  localparam int unsigned     READ_FRAMES = 32;
  localparam int unsigned     FRAME_BYTES = 1 + FS * SAMPLE_BYTES + 2;

  logic clk = 0, rst_n = 0;
  logic btn_start = 0, btn_stop = 0;
  logic irq_out, uart_rxd, uart_txd, led_start, led_stop, led_full;
  logic [7:0] gpio;
  logic td_enable = 0;
  int checks = 0, failures = 0;

  smu_top dut (
    .clk, .rst_n, .btn_start, .btn_stop, .irq_out, .gpio_in(gpio),
    .uart_rxd, .uart_txd, .led_start, .led_stop, .led_full);

  tb_uart_host #(.CLKS_PER_BIT(CPB)) host (.clk, .txd(uart_rxd), .rxd(uart_txd));
  tb_test_device #(.TASK_HALF(13), .ISR_HALF(11), .ISR_PULSES(3), .LAT_MIN(20), .LAT_MAX(60))
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
    #(64'd1_200_000_000 * 10);   // 1.2 billion clocks
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
    repeat (100) @(posedge clk);
    check(td.ev_val_q.size() - ev0 > DEPTH, "more changes happened than fit");
    td_enable = 0;   // the device log is complete for what was stored

    // read the first READ_FRAMES frames of the capture
    for (int f = 0; f < READ_FRAMES; f++) begin
      read_frame(fr);
      foreach (fr[k]) got.push_back(fr[k]);
    end
    check(got.size() == READ_FRAMES * FS, "frames read");
    if (got.size() == READ_FRAMES * FS) check_capture(got, ev0, READ_FRAMES * FS);
    // end of data send rewinds the read address: the first frame comes again
    host.send_frame(8'h12);
    repeat (CPB * 20) @(posedge clk);
    check(!led_full, "re-armed after end of data");
    if (!led_full) m_rearm++;
    read_frame(fr);
    check(fr[0] == got[0] && fr[FS-1] == got[FS-1], "rewound to the first frame");
    check(bad_irq_timing == 0, $sformatf("interrupt period / on-time errors %0d", bad_irq_timing));
    press(btn_stop);
    td_enable = 0;
    check(!irq_out && !led_start && led_stop, "stop: pulses end, stop LED");

    $display("mechanisms: param %0d, bad %0d, irq %0d, isr %0d, latency %0d, full %0d, frames %0d, wrap %0d, stop %0d, rearm %0d",
             m_param, m_bad, m_irq, m_isr, m_latency, m_full, m_frames, m_wrap, m_stop, m_rearm);
    check(m_param > 0 && m_bad > 0 && m_irq > 0 && m_isr > 0 && m_latency > 0 && m_full > 0 &&
          m_frames == READ_FRAMES + 1 && m_rearm > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
