// tb_onchip_ram - self-checking testbench of onchip_ram (64 KB).
//
// Writes random words with random byte enables at random word addresses
// across the whole 16K-word array, plus the first and last word, reading each
// back against a reference copy; reads must answer exactly one cycle later.
module tb_onchip_ram;
  import avmm_pkg::*;
  localparam int WORDS = 16384;
  logic clk = 1'b0;
  logic rst;
  avmm_req_t req;
  avmm_rsp_t rsp;
  logic [31:0] ref_mem [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  onchip_ram u_dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp));

  task automatic wr(int a, logic [31:0] d, logic [3:0] be);
    @(negedge clk);
    req = AVMM_REQ_IDLE; req.write = 1; req.address = 32'(a); req.writedata = d; req.byteenable = be;
    for (int b = 0; b < 4; b++) if (be[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    @(negedge clk); req = AVMM_REQ_IDLE;
  endtask

  task automatic rd(int a);
    @(negedge clk);
    req = AVMM_REQ_IDLE; req.read = 1; req.address = 32'(a);
    @(negedge clk); req = AVMM_REQ_IDLE;
    checks++;
    if (!rsp.readdatavalid || rsp.readdata !== ref_mem[a]) begin
      failures++;
      $display("FAIL read %0d: valid=%0b got %h expected %h", a, rsp.readdatavalid, rsp.readdata, ref_mem[a]);
    end
  endtask

  initial begin
    int addrs [$];
    req = AVMM_REQ_IDLE; rst = 1;
    repeat (2) @(negedge clk); rst = 0;
    addrs.push_back(0); addrs.push_back(WORDS - 1);
    for (int i = 0; i < 200; i++) addrs.push_back($urandom_range(0, WORDS - 1));
    foreach (addrs[i]) begin
      ref_mem[addrs[i]] = 32'h0;
      wr(addrs[i], $urandom, 4'hf);
    end
    foreach (addrs[i]) rd(addrs[i]);
    // partial writes
    foreach (addrs[i]) wr(addrs[i], $urandom, 4'($urandom));
    foreach (addrs[i]) rd(addrs[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
