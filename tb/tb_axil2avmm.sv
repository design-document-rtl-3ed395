// tb_axil2avmm - self-checking testbench of the AXI4-Lite to Avalon-MM
// adapter.
//
// Bridge A faces a memory-like Avalon slave that raises waitrequest at
// random and answers reads after 2 cycles; a random AXI master (AW and W
// raised at different times, random delays on BREADY and RREADY, reads and
// writes offered together) checks every read against a reference copy and
// every response code. Bridge B faces a slave with no wait states and a
// one-cycle read latency; on it the testbench checks the adapter's timing:
// R three cycles after the AR handshake, B two cycles after the AW/W
// handshake. Counted: read/write contests in IDLE (both kinds must win at
// least once), Avalon stalls, backpressure on B and R.
module tb_axil2avmm;
  import axil_pkg::*;
  import avmm_pkg::*;

  logic clk = 1'b0;
  logic rst;
  axil_req_t  a_req, b_req;
  axil_rsp_t  a_rsp, b_rsp;
  avmm_req_t  a_avm_req, b_avm_req;
  avmm_rsp_t  a_avm_rsp, b_avm_rsp;
  int st_a, rd_a, wr_a, st_b, rd_b, wr_b;
  int checks = 0, failures = 0;
  int n_contest_rd = 0, n_contest_wr = 0, n_bp = 0;
  logic [31:0] ref_mem [64];

  always #5 clk = ~clk;

  axil2avmm u_dut_a (.clk, .rst, .axi_req(a_req), .axi_rsp(a_rsp), .avm_req(a_avm_req), .avm_rsp(a_avm_rsp));
  axil2avmm u_dut_b (.clk, .rst, .axi_req(b_req), .axi_rsp(b_rsp), .avm_req(b_avm_req), .avm_rsp(b_avm_rsp));
  tb_avmm_slave_model #(.LATENCY(2), .RANDOM_WAIT(1'b1)) s_a (.clk, .rst, .req(a_avm_req), .rsp(a_avm_rsp),
    .stalls(st_a), .reads(rd_a), .writes(wr_a));
  tb_avmm_slave_model #(.LATENCY(1)) s_b (.clk, .rst, .req(b_avm_req), .rsp(b_avm_rsp),
    .stalls(st_b), .reads(rd_b), .writes(wr_b));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // word index -> byte address; the slave model uses word address bits [5:0]
  // of the byte address it is given, so use addresses whose bits [5:0] are
  // the index
  function automatic logic [31:0] addr_of(int w);
    return 32'h0000_1000 | 32'(w);
  endfunction

  task automatic a_write(int w, logic [31:0] d, logic [3:0] be);
    int aw_done = 0, w_done = 0;
    int lag = $urandom_range(0, 2);
    @(negedge clk);
    a_req.awaddr = addr_of(w); a_req.awvalid = 1;
    a_req.wdata = d; a_req.wstrb = be;
    if (lag == 0) a_req.wvalid = 1;
    while (!(aw_done && w_done)) begin
      #1;
      if (a_req.awvalid && a_rsp.awready) aw_done = 1;
      if (a_req.wvalid && a_rsp.wready) w_done = 1;
      @(negedge clk);
      if (aw_done) a_req.awvalid = 0;
      if (w_done) a_req.wvalid = 0;
      if (lag > 0) begin lag--; if (lag == 0 && !w_done) a_req.wvalid = 1; end
    end
    for (int b = 0; b < 4; b++) if (be[b]) ref_mem[w][8*b +: 8] = d[8*b +: 8];
    // B channel with random backpressure
    while (!a_rsp.bvalid) @(negedge clk);
    repeat ($urandom_range(0, 2)) begin n_bp++; @(negedge clk); check(a_rsp.bvalid, "bvalid held"); end
    a_req.bready = 1;
    #1 check(a_rsp.bresp == RESP_OKAY, "bresp OKAY");
    @(negedge clk); a_req.bready = 0;
  endtask

  task automatic a_read(int w);
    logic [31:0] exp;
    @(negedge clk);
    a_req.araddr = addr_of(w); a_req.arvalid = 1;
    forever begin #1; if (a_rsp.arready) break; @(negedge clk); end
    exp = ref_mem[w];
    @(negedge clk); a_req.arvalid = 0;
    while (!a_rsp.rvalid) @(negedge clk);
    repeat ($urandom_range(0, 2)) begin n_bp++; @(negedge clk); check(a_rsp.rvalid, "rvalid held"); end
    a_req.rready = 1;
    #1 check(a_rsp.rdata == exp && a_rsp.rresp == RESP_OKAY,
             $sformatf("read word %0d: %h expected %h", w, a_rsp.rdata, exp));
    @(negedge clk); a_req.rready = 0;
  endtask

  // read and write offered in the same cycle: one is taken, then the other
  task automatic a_contest(int wr_w, logic [31:0] d, int rd_w);
    logic [31:0] exp_rd;
    logic rd_first;
    @(negedge clk);
    a_req.awaddr = addr_of(wr_w); a_req.awvalid = 1; a_req.wvalid = 1; a_req.wdata = d; a_req.wstrb = '1;
    a_req.araddr = addr_of(rd_w); a_req.arvalid = 1;
    a_req.bready = 1; a_req.rready = 1;
    #1;
    check(a_rsp.arready != a_rsp.awready, "exactly one of read/write taken");
    check(a_rsp.awready == a_rsp.wready, "AW and W taken together");
    rd_first = a_rsp.arready;
    if (rd_first) n_contest_rd++; else n_contest_wr++;
    exp_rd = (rd_first || rd_w != wr_w) ? ref_mem[rd_w] : d;
    ref_mem[wr_w] = d;
    begin
      int got_r = 0, got_b = 0;
      int guard = 0;
      while (!(got_r && got_b) && guard < 200) begin
        #1;
        if (a_req.arvalid && a_rsp.arready) begin @(negedge clk); a_req.arvalid = 0; continue; end
        if (a_req.awvalid && a_rsp.awready) begin @(negedge clk); a_req.awvalid = 0; a_req.wvalid = 0; continue; end
        if (a_rsp.rvalid) begin
          check(a_rsp.rdata == exp_rd, $sformatf("contest read %h expected %h", a_rsp.rdata, exp_rd));
          got_r = 1;
        end
        if (a_rsp.bvalid) got_b = 1;
        @(negedge clk); guard++;
      end
      check(got_r && got_b, "both contest responses");
    end
    a_req = AXIL_REQ_IDLE;
  endtask

  // exact-timing checks on bridge B
  task automatic b_timing();
    int n;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      b_req = AXIL_REQ_IDLE;
      b_req.awaddr = addr_of(k); b_req.awvalid = 1; b_req.wvalid = 1; b_req.wdata = 32'hA5A5_0000 + k; b_req.wstrb = '1;
      b_req.bready = 1;
      #1 check(b_rsp.awready && b_rsp.wready, "B: write taken at once");
      n = 0;
      @(negedge clk); b_req.awvalid = 0; b_req.wvalid = 0;
      while (!b_rsp.bvalid && n < 20) begin n++; @(negedge clk); end
      check(n == 1, $sformatf("B: bvalid %0d cycles after the handshake cycle +1 (expected 1)", n));
      @(negedge clk); b_req = AXIL_REQ_IDLE;
      b_req.araddr = addr_of(k); b_req.arvalid = 1; b_req.rready = 1;
      #1 check(b_rsp.arready, "B: read taken at once");
      n = 0;
      @(negedge clk); b_req.arvalid = 0;
      while (!b_rsp.rvalid && n < 20) begin n++; @(negedge clk); end
      check(n == 2, $sformatf("B: rvalid %0d cycles after the handshake cycle +1 (expected 2)", n));
      check(b_rsp.rdata == 32'hA5A5_0000 + k, "B: read data");
      @(negedge clk); b_req = AXIL_REQ_IDLE;
    end
  endtask

  initial begin
    a_req = AXIL_REQ_IDLE; b_req = AXIL_REQ_IDLE; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    foreach (ref_mem[i]) ref_mem[i] = 32'h0;
    b_timing();
    for (int i = 0; i < 400; i++) begin
      case ($urandom_range(0, 3))
        0, 1: a_write($urandom_range(0, 63), $urandom, ($urandom_range(0, 1) == 0) ? 4'hf : 4'($urandom));
        2:    a_read($urandom_range(0, 63));
        3:    a_contest($urandom_range(0, 63), $urandom, $urandom_range(0, 63));
      endcase
    end
    check(n_contest_rd > 0 && n_contest_wr > 0, "read and write each won a contest");
    check(st_a > 0, "Avalon stalls happened");
    check(n_bp > 0, "B/R backpressure happened");
    $display("contest rd=%0d wr=%0d stalls=%0d backpressure=%0d", n_contest_rd, n_contest_wr, st_a, n_bp);
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
