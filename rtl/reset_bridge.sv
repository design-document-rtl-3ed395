// reset_bridge - distributes the board's push-button reset to every block.
//
// BTN_RESET_n is asynchronous and active low. The bridge asserts its
// active-high output at once when the button is pressed (asynchronous
// assert) and releases it only after STAGES rising clock edges with the
// button released (synchronous deassert), so every block leaves reset in the
// same clock cycle and no flip-flop sees the release close to a clock edge.
//
// Ports: clk, rst_n_in (asynchronous, active low), rst_out (active high).
// That such a bridge sits between the button and the components follows the
// system description; its depth and structure are this design's choice.
module reset_bridge #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_out
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) sync_q <= '1;
    else           sync_q <= {sync_q[STAGES-2:0], 1'b0};
  end

  assign rst_out = sync_q[STAGES-1];

endmodule
