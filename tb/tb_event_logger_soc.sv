// tb_event_logger_soc - end-to-end testbench of the event-logger system at
// its default sizes (64 KB RAM, 256-entry logger).
//
// The testbench stands in for the CPU and the host:
//   * both CPU masters are driven as AXI4-Lite masters;
//   * the instruction master keeps fetching a program image from the RAM
//     (written there first through the data master) and checks every word,
//     so instruction fetches compete with the data master for the RAM;
//   * the data master runs the measurement software: a task-1 / task-2
//     schedule with periods of 500 and 1000 "ms" (scaled to 20 cycles per ms,
//     i.e. 10,000 and 20,000 cycles), each iteration logging TASK_START,
//     doing a random amount of work and logging TASK_END, over a 10 "s"
//     window; one CPU runs both, so a release that falls inside the other
//     task's work starts late;
//   * a dump task then reads STATUS and every entry and prints CSV lines
//     between the start/end markers to the JTAG UART model, polling its free
//     space;
//   * the host side parses the received text and recomputes execution time,
//     period, jitter and context-switch gap, comparing every entry and every
//     metric with the testbench's own record of when each store happened;
//   * a second phase fills the logger past 256 entries to show overflow.
// Mechanisms counted (each must occur): RAM contention between the masters,
// UART waitrequest stalls, UART FIFO full, late task start, overflow, clear,
// SYSID read.
module tb_event_logger_soc;
  import avmm_pkg::*;
  import axil_pkg::*;
  import evlog_pkg::*;

  localparam logic [31:0] LOGGER   = 32'h0002_0040;
  localparam logic [31:0] SYSID    = 32'h0002_0000;
  localparam logic [31:0] UART     = 32'h0002_0060;
  localparam int CYC_PER_MS = 20;
  localparam int P1 = 500 * CYC_PER_MS, P2 = 1000 * CYC_PER_MS;
  localparam int RUN = 10_000 * CYC_PER_MS;
  localparam int PROG_WORDS = 512;

  logic clk = 1'b0;
  logic btn_reset_n, sys_rst;
  axil_req_t ireq, dreq;
  axil_rsp_t irsp, drsp;
  avmm_req_t ureq;
  avmm_rsp_t ursp;
  longint edges = 0;
  int checks = 0, failures = 0;
  int uart_stalls, uart_full;
  int n_contend = 0, n_late = 0, n_overflow = 0, n_clear = 0, n_sysid = 0, n_fetch = 0;
  logic prog_ready = 0, fetch_stop = 0;
  logic [31:0] prog [PROG_WORDS];
  logic [31:0] stack [2048];

  typedef struct { longint ts; int typ; int id; } ev_t;
  ev_t expected [$];
  longint clear_edge;

  always #5 clk = ~clk;
  always @(posedge clk) edges <= edges + 1;

  event_logger_soc u_dut (
    .clk, .btn_reset_n, .sys_rst,
    .cpu_instr_req(ireq), .cpu_instr_rsp(irsp),
    .cpu_data_req(dreq),  .cpu_data_rsp(drsp),
    .uart_req(ureq),      .uart_rsp(ursp));

  // RAM contention: both masters ask for the RAM in the same cycle.
  always @(negedge clk) begin
    #2;
    if (u_dut.instr_req.read && (u_dut.data_req.read || u_dut.data_req.write)
        && u_dut.data_req.address < 32'h1_0000
        && (u_dut.instr_rsp.waitrequest || u_dut.data_rsp.waitrequest)) n_contend++;
  end

  tb_jtag_uart_model #(.DRAIN(24)) u_uart (.clk, .rst(sys_rst), .req(ureq), .rsp(ursp),
    .stalls(uart_stalls), .full_seen(uart_full));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------- data master
  // AXI4-Lite write; returns the edge count just before the edge at which the
  // interconnect accepts the resulting Avalon write (the capture edge for a
  // logger event).
  task automatic dm_write(logic [31:0] a, logic [31:0] d, output longint e);
    @(negedge clk);
    dreq = AXIL_REQ_IDLE;
    dreq.awaddr = a; dreq.awvalid = 1; dreq.wdata = d; dreq.wstrb = '1; dreq.wvalid = 1;
    dreq.bready = 1;
    forever begin
      #1;
      if (drsp.awready) break;
      @(negedge clk);
    end
    @(negedge clk);
    dreq.awvalid = 0; dreq.wvalid = 0;
    // the Avalon write leaves the adapter in this cycle; wait for its acceptance
    forever begin
      #1;
      if (!u_dut.data_rsp.waitrequest) break;
      @(negedge clk);
    end
    e = edges;
    while (!drsp.bvalid) @(negedge clk);
    @(negedge clk); dreq = AXIL_REQ_IDLE;
  endtask

  task automatic dm_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    dreq = AXIL_REQ_IDLE;
    dreq.araddr = a; dreq.arvalid = 1; dreq.rready = 1;
    forever begin
      #1;
      if (drsp.arready) break;
      @(negedge clk);
    end
    @(negedge clk); dreq.arvalid = 0;
    while (!drsp.rvalid) @(negedge clk);
    d = drsp.rdata;
    @(negedge clk); dreq = AXIL_REQ_IDLE;
  endtask

  task automatic log_event(int typ, int id);
    longint e;
    dm_write(LOGGER + 4 * REG_EVENT_WRITE, 32'((typ << 8) | id), e);
    expected.push_back('{ts: e - clear_edge - 1, typ: typ, id: id});
  endtask

  task automatic logger_clear();
    longint e;
    dm_write(LOGGER + 4 * REG_CONTROL, 32'h1, e);
    clear_edge = e;
    expected.delete();
    n_clear++;
  endtask

  task automatic wait_until(longint edge_no);
    while (edges < edge_no) @(negedge clk);
  endtask

  // --------------------------------------------------------------- UART out
  task automatic uart_puts(string s);
    int i = 0;
    logic [31:0] ctl;
    longint e;
    while (i < s.len()) begin
      int space;
      dm_read(UART + 4, ctl);
      space = int'(ctl[31:16]);
      for (int k = 0; k < space && i < s.len(); k++) begin
        dm_write(UART, 32'(s[i]), e);
        i++;
      end
    end
  endtask

  task automatic dump_task(output int count, output logic ovf);
    logic [31:0] st, lo, hi;
    dm_read(LOGGER + 4 * REG_STATUS, st);
    count = int'(st[8:0]);
    ovf   = st[STATUS_OVERFLOW_BIT];
    uart_puts("--- EVENT LOG START ---\n");
    for (int i = 0; i < count; i++) begin
      dm_read(LOGGER + 4 * REG_EVENT_READ_LO, lo);
      dm_read(LOGGER + 4 * REG_EVENT_READ_HI, hi);
      uart_puts($sformatf("%0d,%0d,%0d\n", lo, hi[15:8], hi[7:0]));
    end
    uart_puts("--- EVENT LOG END ---\n");
    uart_puts($sformatf("entries=%0d overflow=%0d\n", count, ovf));
  endtask

  // ------------------------------------------------------ instruction master
  initial begin
    ireq = AXIL_REQ_IDLE;
    wait (prog_ready);
    while (!fetch_stop) begin
      int w;
      @(negedge clk);
      w = $urandom_range(0, PROG_WORDS - 1);
      ireq = AXIL_REQ_IDLE; ireq.araddr = 32'(4 * w); ireq.arvalid = 1; ireq.rready = 1;
      forever begin
        #1;
        if (irsp.arready) break;
        @(negedge clk);
      end
      @(negedge clk); ireq.arvalid = 0;
      while (!irsp.rvalid) @(negedge clk);
      check(irsp.rdata == prog[w], $sformatf("fetch word %0d", w));
      @(negedge clk); ireq = AXIL_REQ_IDLE;
      n_fetch++;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
  end

  // ------------------------------------------------------------ main flow
  initial begin
    logic [31:0] d;
    longint e;
    int count;
    logic ovf;
    longint rel1, rel2;
    longint t1_start [$], t2_start [$], t1_exec [$], t2_exec [$];

    dreq = AXIL_REQ_IDLE;
    btn_reset_n = 1'b0;
    repeat (4) @(negedge clk);
    btn_reset_n = 1'b1;
    while (sys_rst) @(negedge clk);

    // boot: load a program image, check the system ID
    for (int w = 0; w < PROG_WORDS; w++) begin
      prog[w] = $urandom;
      dm_write(32'(4 * w), prog[w], e);
    end
    prog_ready = 1;
    dm_read(SYSID, d);
    check(d == 32'h0002_0040, "SYSID value");
    n_sysid++;
    dm_read(32'h0003_0000, d);
    check(d == 0, "unmapped address reads zero");

    // ---------------- measurement run: two periodic tasks
    logger_clear();
    rel1 = edges + 100;
    rel2 = rel1;   // both tasks are released together when the scheduler starts
    while (1) begin
      int id;
      longint rel;
      if (rel1 <= rel2) begin id = 1; rel = rel1; end
      else              begin id = 2; rel = rel2; end
      if (rel - clear_edge > RUN) break;
      if (edges > rel) n_late++;
      wait_until(rel);
      log_event(EVT_TASK_START, id);
      // measured work: task 2 does the longer loop; both touch their
      // stack in RAM now and then
      begin
        longint work_end;
        work_end = edges + (id == 1 ? $urandom_range(300, 900) : $urandom_range(2000, 7000));
        while (edges + 8 < work_end) begin
          int w;
          w = 1024 + 64 * id + $urandom_range(0, 63);
          stack[w] = $urandom;
          dm_write(32'(4 * w), stack[w], e);
          dm_read(32'(4 * w), d);
          check(d == stack[w], "task stack word");
          repeat ($urandom_range(0, 40)) @(negedge clk);
        end
        wait_until(work_end);
      end
      log_event(EVT_TASK_END, id);
      if (id == 1) rel1 += P1; else rel2 += P2;
    end
    check(expected.size() <= 256, "run fits in the buffer");

    // ---------------- dump over the UART and host-side analysis
    dump_task(count, ovf);
    check(count == expected.size(), $sformatf("entry count %0d exp %0d", count, expected.size()));
    check(!ovf, "no overflow in the measurement run");
    wait (u_uart.fifo.size() == 0);
    repeat (10) @(negedge clk);
    begin
      string txt, line;
      int p, n, ts, typ, id;
      int start_idx, end_idx;
      longint last_start [3], last_end_ts;
      int last_end_id;
      longint min_e [3], max_e [3];
      longint cs_count;
      txt = u_uart.host_text;
      start_idx = -1;
      end_idx = -1;
      // split into lines
      p = 0; n = 0;
      last_end_id = 0; cs_count = 0;
      foreach (min_e[i]) begin min_e[i] = 64'h7fff_ffff; max_e[i] = 0; last_start[i] = -1; end
      for (int i = 0; i < txt.len(); i++) begin
        if (txt[i] == "\n") begin
          line = txt.substr(p, i - 1);
          p = i + 1;
          if (line == "--- EVENT LOG START ---") start_idx = 0;
          else if (line == "--- EVENT LOG END ---") end_idx = n;
          else if (start_idx >= 0 && end_idx < 0) begin
            void'($sscanf(line, "%d,%d,%d", ts, typ, id));
            check(n < expected.size(), "no extra CSV line");
            if (n < expected.size()) begin
              check(longint'(ts) == expected[n].ts && typ == expected[n].typ && id == expected[n].id,
                    $sformatf("CSV line %0d '%s' expected %0d,%0d,%0d", n, line,
                              expected[n].ts, expected[n].typ, expected[n].id));
            end
            // host metrics
            if (typ == EVT_TASK_START) begin
              if (last_start[id] >= 0) begin
                if (id == 1) t1_start.push_back(ts - last_start[id]);
                else         t2_start.push_back(ts - last_start[id]);
              end
              last_start[id] = ts;
              if (last_end_id != 0 && last_end_id != id) begin
                check(ts > last_end_ts, "context-switch gap positive");
                cs_count++;
              end
            end else if (typ == EVT_TASK_END) begin
              longint x;
              x = ts - last_start[id];
              if (id == 1) t1_exec.push_back(x); else t2_exec.push_back(x);
              if (x < min_e[id]) min_e[id] = x;
              if (x > max_e[id]) max_e[id] = x;
              last_end_ts = ts;
              last_end_id = id;
            end
            n++;
          end
        end
      end
      check(start_idx == 0 && end_idx == expected.size(), "CSV markers and line count");
      // Periods: equal to the nominal period unless a start was late.
      foreach (t1_start[i]) check(t1_start[i] >= P1 - 7000 && t1_start[i] <= P1 + 7000, "task 1 period near 500 ms");
      foreach (t2_start[i]) check(t2_start[i] >= P2 - 1000 && t2_start[i] <= P2 + 1000, "task 2 period near 1000 ms");
      foreach (t1_exec[i])  check(t1_exec[i] >= 300 && t1_exec[i] <= 920, "task 1 execution time");
      foreach (t2_exec[i])  check(t2_exec[i] >= 2000 && t2_exec[i] <= 7020, "task 2 execution time");
      check(t1_start.size() >= 18 && t2_start.size() >= 8, "periods measured");
      check(cs_count > 0, "context switches seen");
      $display("host: %0d events; task1 exec %0d..%0d cycles (jitter %0d), task2 exec %0d..%0d (jitter %0d); %0d task switches",
               n, min_e[1], max_e[1], max_e[1] - min_e[1], min_e[2], max_e[2], max_e[2] - min_e[2], cs_count);
    end

    // ---------------- overflow phase
    logger_clear();
    for (int k = 0; k < 300; k++) log_event(k % 2 ? EVT_TASK_END : EVT_TASK_START, 1 + (k / 2) % 2);
    dm_read(LOGGER + 4 * REG_STATUS, d);
    check(d[STATUS_OVERFLOW_BIT] && d[STATUS_FULL_BIT] && d[8:0] == 9'd256, $sformatf("overflow status %h", d));
    if (d[STATUS_OVERFLOW_BIT]) n_overflow++;
    for (int i = 0; i < 256; i++) begin
      logic [31:0] lo, hi;
      dm_read(LOGGER + 4 * REG_EVENT_READ_LO, lo);
      dm_read(LOGGER + 4 * REG_EVENT_READ_HI, hi);
      check(longint'(lo) == expected[i].ts && hi == 32'((expected[i].typ << 8) | expected[i].id),
            $sformatf("overflow entry %0d", i));
    end
    fetch_stop = 1;
    repeat (20) @(negedge clk);

    check(n_contend > 0,   "RAM contention happened");
    check(uart_stalls > 0, "UART waitrequest stall happened");
    check(uart_full > 0,   "UART FIFO full happened");
    check(n_late > 0,      "late task start happened");
    check(n_overflow > 0,  "overflow happened");
    check(n_clear > 0 && n_sysid > 0 && n_fetch > 100, "clear, SYSID and fetches happened");
    $display("contend=%0d uart_stalls=%0d uart_full=%0d late=%0d overflow=%0d clears=%0d fetches=%0d",
             n_contend, uart_stalls, uart_full, n_late, n_overflow, n_clear, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
