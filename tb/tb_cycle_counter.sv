// tb_cycle_counter - self-checking testbench of cycle_counter.
//
// Runs a 32-bit counter (the default width) and a 4-bit one side by side
// against a reference count kept in the testbench: after reset both read 0
// and rise by one per cycle; a clear pulse restarts them from 0 on the next
// cycle; the 4-bit one is run past 15 to check the wrap to 0.
module tb_cycle_counter;
  logic clk = 1'b0;
  logic rst, clear;
  logic [31:0] count32;
  logic [3:0]  count4;
  int checks = 0, failures = 0;
  longint ref_cnt;

  always #5 clk = ~clk;

  cycle_counter                u_dut   (.clk, .rst, .clear, .count(count32));
  cycle_counter #(.WIDTH(4))   u_dut4  (.clk, .rst, .clear, .count(count4));

  task automatic check_now(string what);
    checks++;
    if (count32 !== 32'(ref_cnt) || count4 !== 4'(ref_cnt)) begin
      failures++;
      $display("FAIL %s: count32=%0d count4=%0d expected %0d", what, count32, count4, ref_cnt);
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    ref_cnt = 0;
    check_now("after reset");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); ref_cnt++;
      check_now("counting");
    end
    clear = 1'b1;
    @(negedge clk); clear = 1'b0; ref_cnt = 0;
    check_now("after clear");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); ref_cnt++;
      check_now("after clear counting");
    end
    // clear held for several cycles keeps the count at zero
    clear = 1'b1;
    repeat (3) begin @(negedge clk); ref_cnt = 0; check_now("clear held"); end
    clear = 1'b0;
    @(negedge clk); ref_cnt = 1; check_now("release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
