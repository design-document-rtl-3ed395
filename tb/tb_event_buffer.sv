// tb_event_buffer - self-checking testbench of event_buffer (256 x 64).
//
// Random writes and reads against a reference array kept in the testbench.
// Each read is checked one cycle after its address was presented (read
// latency 1), including reads of the address written in the same cycle,
// which must return the new data.
module tb_event_buffer;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic we;
  logic [7:0]  waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] ref_mem [DEPTH];
  logic [63:0] expect_q;
  logic        expect_v;
  int checks = 0, failures = 0, same_addr = 0;

  always #5 clk = ~clk;

  event_buffer u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; expect_v = 0;
    // fill every entry first so that every read has a known value
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL read: got %h expected %h", rdata, expect_q);
        end
      end
      we    = ($urandom_range(0, 1) == 1);
      waddr = 8'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 8'($urandom);
      wdata = {$urandom, $urandom};
      expect_v = 1;
      if (we && waddr == raddr) begin
        expect_q = wdata;
        same_addr++;
      end else begin
        expect_q = ref_mem[raddr];
      end
      if (we) ref_mem[waddr] = wdata;
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL no same-address case"); end
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
