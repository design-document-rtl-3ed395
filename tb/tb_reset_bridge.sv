// tb_reset_bridge - self-checking testbench of reset_bridge.
//
// Checks that the output asserts immediately (between clock edges) when the
// button goes low, stays asserted while it is low, and releases exactly
// STAGES = 2 rising edges after the button is released.
module tb_reset_bridge;
  logic clk = 1'b0;
  logic rst_n_in, rst_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reset_bridge u_dut (.clk, .rst_n_in, .rst_out);

  task automatic expect_rst(logic v, string what);
    checks++;
    if (rst_out !== v) begin
      failures++;
      $display("FAIL %s: rst_out=%0b expected %0b", what, rst_out, v);
    end
  endtask

  initial begin
    rst_n_in = 1'b0;
    #2; expect_rst(1'b1, "power-on press");
    repeat (3) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      rst_n_in = 1'b1;                       // release at negedge
      @(negedge clk); expect_rst(1'b1, "one edge after release");
      @(negedge clk); expect_rst(1'b0, "two edges after release");
      repeat (5) begin @(negedge clk); expect_rst(1'b0, "running"); end
      #2 rst_n_in = 1'b0;                    // press between edges
      #1 expect_rst(1'b1, "asynchronous assert");
      repeat (3) begin @(negedge clk); expect_rst(1'b1, "held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
