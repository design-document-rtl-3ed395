// tb_avmm_interconnect - self-checking testbench of avmm_interconnect.
//
// Two random master processes (instruction: RAM reads only; data: reads and
// writes to RAM, SYSID, logger, UART windows and to unmapped addresses) run
// at once against memory-like slave models; the UART model raises
// waitrequest at random and answers after 2 cycles. A reference copy of
// every slave's contents, updated when a write is accepted, gives the value
// each read must return; responses must arrive in order, one per read.
// The instruction master only reads the lower half of the RAM model and the
// data master only writes the upper half, so their order never matters.
// Also checked: each slave sees word addresses relative to its base; unmapped
// reads return zero. Counted mechanisms (each must happen): RAM contention
// between the two masters, round-robin alternation, slave waitrequest
// stalls, master blocked by its own outstanding read, default-slave reads.
module tb_avmm_interconnect;
  import avmm_pkg::*;
  localparam logic [31:0] RAM_BASE = 32'h0000_0000, SYSID_BASE = 32'h0002_0000,
                          LOG_BASE = 32'h0002_0040, UART_BASE = 32'h0002_0060;
  localparam int NTRANS = 3000;

  logic clk = 1'b0;
  logic rst;
  avmm_req_t instr_req, data_req, ram_req, sysid_req, logger_req, uart_req;
  avmm_rsp_t instr_rsp, data_rsp, ram_rsp, sysid_rsp, logger_rsp, uart_rsp;
  int stl [4], nrd [4], nwr [4];
  int checks = 0, failures = 0;
  int n_contend = 0, n_alternate = 0, n_blocked = 0, n_default = 0;
  int last_winner = -1;

  // reference contents: slave index * 64 + word
  logic [31:0] ref_mem [256];
  logic [31:0] exp_q [2][$];
  int done [2];

  always #5 clk = ~clk;

  avmm_interconnect u_dut (
    .clk, .rst, .instr_req, .instr_rsp, .data_req, .data_rsp,
    .ram_req, .ram_rsp, .sysid_req, .sysid_rsp, .logger_req, .logger_rsp,
    .uart_req, .uart_rsp);

  tb_avmm_slave_model #(.LATENCY(1)) s_ram (.clk, .rst, .req(ram_req), .rsp(ram_rsp),
    .stalls(stl[0]), .reads(nrd[0]), .writes(nwr[0]));
  tb_avmm_slave_model #(.LATENCY(1)) s_sys (.clk, .rst, .req(sysid_req), .rsp(sysid_rsp),
    .stalls(stl[1]), .reads(nrd[1]), .writes(nwr[1]));
  tb_avmm_slave_model #(.LATENCY(1)) s_log (.clk, .rst, .req(logger_req), .rsp(logger_rsp),
    .stalls(stl[2]), .reads(nrd[2]), .writes(nwr[2]));
  tb_avmm_slave_model #(.LATENCY(2), .RANDOM_WAIT(1'b1)) s_uart (.clk, .rst, .req(uart_req),
    .rsp(uart_rsp), .stalls(stl[3]), .reads(nrd[3]), .writes(nwr[3]));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Random address for the data master: returns byte address and reference
  // index (-1 for unmapped).
  function automatic void pick_data_addr(logic is_write, output logic [31:0] a, output int idx);
    int w;
    case ($urandom_range(0, 5))
      0, 1: begin w = $urandom_range(32, 63); a = RAM_BASE + 32'(4 * w); idx = w; end
      2:    begin w = $urandom_range(0, 1);   a = SYSID_BASE + 32'(4 * w); idx = 64 + w; end
      3:    begin w = $urandom_range(0, 7);   a = LOG_BASE + 32'(4 * w); idx = 128 + w; end
      4:    begin w = $urandom_range(0, 1);   a = UART_BASE + 32'(4 * w); idx = 192 + w; end
      default: begin a = 32'h0004_0000 + 32'(4 * $urandom_range(0, 100)); idx = -1; end
    endcase
    if (!is_write && idx < 0) n_default++;
    if (!is_write && $urandom_range(0, 9) == 0 && idx >= 0 && idx < 64) begin
      w = $urandom_range(0, 31); a = RAM_BASE + 32'(4 * w); idx = w;   // shared lower RAM
    end
  endfunction

  // Drive one request at a negedge and hold it until accepted.
  task automatic issue(int m, logic is_write, logic [31:0] a, logic [31:0] d, int idx);
    avmm_req_t r;
    r = AVMM_REQ_IDLE;
    r.address = a; r.read = !is_write; r.write = is_write; r.writedata = d; r.byteenable = '1;
    if (m == 0) instr_req = r; else data_req = r;
    forever begin
      #1;
      if (!(m == 0 ? instr_rsp.waitrequest : data_rsp.waitrequest)) break;
      @(negedge clk);
    end
    // accepted at the coming edge
    if (is_write) begin
      if (idx >= 0) ref_mem[idx] = d;
    end else begin
      exp_q[m].push_back(idx >= 0 ? ref_mem[idx] : 32'h0);
    end
    @(negedge clk);
    if (m == 0) instr_req = AVMM_REQ_IDLE; else data_req = AVMM_REQ_IDLE;
  endtask

  // Response monitors, sampled mid-cycle.
  always @(negedge clk) begin
    if (!rst) begin
      if (instr_rsp.readdatavalid) begin
        check(exp_q[0].size() > 0, "instr response expected");
        if (exp_q[0].size() > 0) begin
          logic [31:0] e;
          e = exp_q[0].pop_front();
          check(instr_rsp.readdata == e, $sformatf("instr read %h exp %h", instr_rsp.readdata, e));
        end
      end
      if (data_rsp.readdatavalid) begin
        check(exp_q[1].size() > 0, "data response expected");
        if (exp_q[1].size() > 0) begin
          logic [31:0] e;
          e = exp_q[1].pop_front();
          check(data_rsp.readdata == e, $sformatf("data read %h exp %h", data_rsp.readdata, e));
        end
      end
    end
  end

  // Mechanism counters, sampled just before the edge.
  always @(negedge clk) begin
    #2;
    if (!rst) begin
      logic ri, rd;
      ri = (instr_req.read || instr_req.write) && instr_req.address < 32'h1_0000;
      rd = (data_req.read || data_req.write) && data_req.address < 32'h1_0000;
      if (ri && rd && u_dut.pending_q[0] == 0 && u_dut.pending_q[1] == 0) begin
        int w;
        n_contend++;
        check(instr_rsp.waitrequest != data_rsp.waitrequest, "exactly one master wins the RAM");
        w = instr_rsp.waitrequest ? 1 : 0;
        if (last_winner >= 0 && w != last_winner) n_alternate++;
        last_winner = w;
      end
      if ((data_req.read || data_req.write) && data_rsp.waitrequest && u_dut.pending_q[1]
          && !data_rsp.readdatavalid) n_blocked++;
    end
  end

  // Slave-side address check: every request a slave sees is a word address
  // inside its window.
  always @(negedge clk) begin
    #2;
    if ((sysid_req.read || sysid_req.write))   check(sysid_req.address < 2,  "sysid word address");
    if ((logger_req.read || logger_req.write)) check(logger_req.address < 8, "logger word address");
    if ((uart_req.read || uart_req.write))     check(uart_req.address < 2,   "uart word address");
    if ((ram_req.read || ram_req.write))       check(ram_req.address < 64,   "ram word address");
  end

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 32'h0;
    instr_req = AVMM_REQ_IDLE; data_req = AVMM_REQ_IDLE; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    fork
      begin : instr_master
        for (int i = 0; i < NTRANS; i++) begin
          int w = $urandom_range(0, 31);
          issue(0, 1'b0, RAM_BASE + 32'(4 * w), 32'h0, w);
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
        done[0] = 1;
      end
      begin : data_master
        // seed the shared lower RAM half once so instruction reads see data
        for (int w = 0; w < 32; w++) issue(1, 1'b1, RAM_BASE + 32'(4 * w), $urandom, w);
        for (int i = 0; i < NTRANS; i++) begin
          logic [31:0] a; int idx; logic wr;
          wr = ($urandom_range(0, 1) == 0);
          pick_data_addr(wr, a, idx);
          if (wr && idx >= 0 && idx < 32) continue;
          issue(1, wr, a, $urandom, idx);
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
        done[1] = 1;
      end
    join
    repeat (5) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all reads answered");
    check(n_contend > 0,   "RAM contention happened");
    check(n_alternate > 0, "round-robin alternation happened");
    check(stl[3] > 0,      "slave waitrequest stall happened");
    check(n_blocked > 0,   "outstanding-read block happened");
    check(n_default > 0,   "default-slave read happened");
    check(nrd[1] > 0 && nrd[2] > 0 && nrd[3] > 0 && nwr[2] > 0, "every slave reached");
    $display("contend=%0d alternate=%0d uart_stalls=%0d blocked=%0d default=%0d",
             n_contend, n_alternate, stl[3], n_blocked, n_default);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
