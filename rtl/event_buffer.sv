// event_buffer - DEPTH x WIDTH storage for logged events (256 x 64 bits =
// 2 KB by default, four M9K blocks on a Cyclone IV).
//
// A simple dual-port memory: the write port stores `wdata` at `waddr` when
// `we` is high; the read port registers the word at `raddr`, so `rdata`
// shows it one cycle after `raddr` was presented. When the same address is
// written and read in one cycle, `rdata` returns the newly written word (a
// bypass register beside the array), so an entry can be read back in the
// very next cycle after it was captured.
//
// The size follows the logger's specification; the port arrangement and the
// write-to-read bypass are this design's choices.
module event_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] mem_q;
  logic [WIDTH-1:0] bypass_q;
  logic             bypass_sel;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    mem_q <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    bypass_sel <= we && (waddr == raddr);
    bypass_q   <= wdata;
  end

  assign rdata = bypass_sel ? bypass_q : mem_q;

endmodule
