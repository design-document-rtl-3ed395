// cycle_counter - free-running cycle counter that timestamps logged events.
//
// The count increments by one on every rising clock edge and wraps from
// all-ones to zero; at 100 MHz a 32-bit count wraps after about 42.9 s and
// resolves 10 ns. `clear` (from the logger's CONTROL register) and `rst`
// load zero on the next edge, so the count reads 0 in the cycle after the
// clear and 1 in the cycle after that.
//
// Ports: clk, rst (synchronous, active high), clear, count[WIDTH-1:0].
// The width and the free-running, clearable behaviour follow the logger's
// specification; synchronous clear is this design's choice.
module cycle_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else              count <= count + 1'b1;
  end

endmodule
