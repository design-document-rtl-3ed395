// tb_sysid - self-checking testbench of sysid.
//
// Reads offset 0 (the ID), other offsets (zero) and checks that a write does
// not change the ID; every read must answer exactly one cycle later.
module tb_sysid;
  import avmm_pkg::*;
  localparam logic [31:0] ID = 32'h0002_0040;
  logic clk = 1'b0;
  logic rst;
  avmm_req_t req;
  avmm_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sysid u_dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp));

  task automatic rd(logic [31:0] a, logic [31:0] exp);
    @(negedge clk);
    req = AVMM_REQ_IDLE; req.read = 1; req.address = a;
    checks++;
    if (rsp.waitrequest) begin failures++; $display("FAIL waitrequest"); end
    @(negedge clk);
    req = AVMM_REQ_IDLE;
    checks++;
    if (!rsp.readdatavalid || rsp.readdata !== exp) begin
      failures++;
      $display("FAIL read %0d: valid=%0b data=%h expected %h", a, rsp.readdatavalid, rsp.readdata, exp);
    end
    @(negedge clk);
    checks++;
    if (rsp.readdatavalid) begin failures++; $display("FAIL valid longer than one cycle"); end
  endtask

  initial begin
    req = AVMM_REQ_IDLE; rst = 1;
    repeat (2) @(negedge clk); rst = 0;
    rd(0, ID);
    rd(1, 0);
    @(negedge clk); req = AVMM_REQ_IDLE; req.write = 1; req.address = 0; req.writedata = 32'hdead_beef; req.byteenable = '1;
    @(negedge clk); req = AVMM_REQ_IDLE;
    rd(0, ID);
    rd(7, 0);
    rd(0, ID);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
