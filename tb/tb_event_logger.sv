// tb_event_logger - self-checking testbench of event_logger (256 entries).
//
// Plays the CPU on the logger's Avalon-MM slave port. The testbench counts
// clock edges itself, so the expected timestamp of each event is the number
// of cycles between the CONTROL clear and the EVENT_WRITE, minus one (the
// counter reads 0 in the cycle after the clear). It checks:
//   * capture: entries read back (LO then HI) match the events written, with
//     timestamps taken in the very cycle of the write, including back-to-back
//     writes and a readout that starts one cycle after a capture;
//   * STATUS: entry count, full and overflow bits;
//   * overflow: 300 writes keep the first 256 entries, drop the rest and set
//     overflow; the stored entries are unchanged;
//   * reads past the last entry return zero and do not move the pointer;
//   * CONTROL clear empties the buffer and restarts the counter;
//   * every read answers exactly one cycle later, waitrequest stays low.
module tb_event_logger;
  import avmm_pkg::*;
  import evlog_pkg::*;
  localparam int DEPTH = 256;

  logic clk = 1'b0;
  logic rst;
  avmm_req_t req;
  avmm_rsp_t rsp;
  longint edges = 0;
  longint clear_edge;
  int checks = 0, failures = 0;
  int n_overflow = 0, n_full = 0, n_b2b = 0, n_clear = 0, n_past_end = 0;

  typedef struct { logic [31:0] ts; logic [15:0] info; } ev_t;
  ev_t model [$];
  logic model_ovf;

  always #5 clk = ~clk;
  always @(posedge clk) edges <= edges + 1;

  event_logger u_dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Drive one write; returns the edge count before the edge that takes it.
  task automatic bus_write(logic [2:0] a, logic [31:0] d, output longint e);
    @(negedge clk);
    req = AVMM_REQ_IDLE; req.write = 1; req.address = 32'(a); req.writedata = d; req.byteenable = '1;
    e = edges;
    #1 check(!rsp.waitrequest, "write waitrequest low");
  endtask

  task automatic bus_idle();
    @(negedge clk); req = AVMM_REQ_IDLE;
  endtask

  task automatic bus_read(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    req = AVMM_REQ_IDLE; req.read = 1; req.address = 32'(a);
    #1 check(!rsp.waitrequest, "read waitrequest low");
    @(negedge clk);
    req = AVMM_REQ_IDLE;
    check(rsp.readdatavalid, "readdatavalid one cycle after read");
    d = rsp.readdata;
  endtask

  task automatic log_event(logic [7:0] typ, logic [7:0] id);
    longint e;
    bus_write(REG_EVENT_WRITE, {16'h0, typ, id}, e);
    if (model.size() < DEPTH) model.push_back('{ts: 32'(e - clear_edge - 1), info: {typ, id}});
    else model_ovf = 1;
  endtask

  task automatic clear_all();
    longint e;
    bus_write(REG_CONTROL, 32'h1, e);
    clear_edge = e;
    model.delete();
    model_ovf = 0;
    n_clear++;
    bus_idle();
  endtask

  task automatic check_status();
    logic [31:0] s;
    bus_read(REG_STATUS, s);
    check(s[8:0] == 9'(model.size()), $sformatf("STATUS count %0d exp %0d", s[8:0], model.size()));
    check(s[STATUS_OVERFLOW_BIT] == model_ovf, "STATUS overflow");
    check(s[STATUS_FULL_BIT] == (model.size() == DEPTH), "STATUS full");
    check(s[15:9] == 0 && s[31:18] == 0, "STATUS reserved bits zero");
    if (s[STATUS_OVERFLOW_BIT]) n_overflow++;
    if (s[STATUS_FULL_BIT]) n_full++;
  endtask

  task automatic read_all_and_check();
    logic [31:0] lo, hi;
    foreach (model[i]) begin
      bus_read(REG_EVENT_READ_LO, lo);
      bus_read(REG_EVENT_READ_HI, hi);
      check(lo == model[i].ts, $sformatf("entry %0d ts %0d exp %0d", i, lo, model[i].ts));
      check(hi == {16'h0, model[i].info}, $sformatf("entry %0d info %h exp %h", i, hi, model[i].info));
    end
    // past the end: zeros, pointer stays
    bus_read(REG_EVENT_READ_HI, hi);
    check(hi == 0, "read past end returns zero");
    bus_read(REG_EVENT_READ_LO, lo);
    check(lo == 0, "read past end returns zero (LO)");
    n_past_end++;
  endtask

  initial begin
    logic [31:0] d;
    longint e;
    req = AVMM_REQ_IDLE; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    clear_all();
    check_status();

    // A few events with gaps, like task start/end pairs.
    for (int k = 0; k < 6; k++) begin
      log_event(EVT_TASK_START, 8'(1 + k % 2));
      repeat ($urandom_range(0, 20)) bus_idle();
      log_event(EVT_TASK_END, 8'(1 + k % 2));
      bus_idle();
    end
    // Back-to-back writes, one per cycle.
    for (int k = 0; k < 5; k++) begin log_event(EVT_CONTEXT_SWITCH, 8'(k)); n_b2b++; end
    // Readout starts in the cycle right after a capture.
    bus_read(REG_EVENT_READ_LO, d);
    check(d == model[0].ts, "first LO right after capture");
    bus_read(REG_EVENT_READ_HI, d);
    check(d == {16'h0, model[0].info}, "first HI right after capture");
    bus_read(REG_STATUS, d);
    check(d[8:0] == 9'(model.size()), "count not lowered by reading");
    void'(model.pop_front());
    read_all_and_check();
    clear_all();

    // Capture then immediate readout of the only entry.
    log_event(EVT_TASK_START, 8'd2);
    bus_read(REG_EVENT_READ_LO, d);
    check(d == model[0].ts, "single entry LO right after capture");
    clear_all();

    // Fill past capacity: overflow.
    for (int k = 0; k < 300; k++) begin
      log_event(8'($urandom_range(1, 3)), 8'($urandom_range(1, 2)));
      if (k % 7 == 0) bus_idle();
      if (k == 254 || k == 255 || k == 256) check_status();
    end
    bus_idle();
    check_status();
    read_all_and_check();
    check_status();   // reading does not change count or flags

    // Clear empties everything and restarts the counter.
    clear_all();
    check_status();
    bus_read(REG_EVENT_READ_HI, d);
    check(d == 0, "empty after clear");
    repeat (37) bus_idle();
    log_event(EVT_TASK_START, 8'd1);
    log_event(EVT_TASK_END, 8'd1);
    bus_idle();
    check_status();
    read_all_and_check();

    // Write-only registers read as zero.
    bus_read(REG_EVENT_WRITE, d); check(d == 0, "EVENT_WRITE reads zero");
    bus_read(REG_CONTROL, d);     check(d == 0, "CONTROL reads zero");
    // CONTROL with bit 0 clear does nothing.
    bus_write(REG_CONTROL, 32'h2, e); bus_idle();
    check_status();

    check(n_overflow > 0, "overflow happened");
    check(n_full > 0, "full happened");
    check(n_clear > 0 && n_past_end > 0 && n_b2b > 0, "mechanisms exercised");
    $display("overflow=%0d full=%0d clears=%0d back_to_back=%0d past_end=%0d",
             n_overflow, n_full, n_clear, n_b2b, n_past_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
