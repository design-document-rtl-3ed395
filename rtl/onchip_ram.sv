// onchip_ram - the system's 64 KB on-chip RAM, holding the CPU's program,
// data, stacks and the FreeRTOS heap (there is no external memory).
//
// A single-port memory of SIZE_BYTES/4 32-bit words on the Avalon-MM bus.
// The slave address is a word address. A write stores the bytes selected by
// byteenable; a read returns the addressed word with readdatavalid exactly
// one cycle later. waitrequest is always low. Both CPU masters reach this
// one port through the interconnect, which arbitrates between them.
//
// The 64 KB size follows the system description; the single port, the
// one-cycle read latency and byte-enable handling are this design's choices.
// Contents are not reset (like block RAM); a read of a never-written word
// returns whatever the array holds.
module onchip_ram
  import avmm_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  localparam int unsigned WORDS     = SIZE_BYTES / 4,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic      clk,
  input  logic      rst,
  input  avmm_req_t avs_req,
  output avmm_rsp_t avs_rsp
);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] waddr;
  logic [31:0]   rdata_q;
  logic          rvalid_q;

  assign waddr = avs_req.address[AW-1:0];

  always_ff @(posedge clk) begin
    if (avs_req.write) begin
      for (int b = 0; b < 4; b++) begin
        if (avs_req.byteenable[b]) mem[waddr][8*b +: 8] <= avs_req.writedata[8*b +: 8];
      end
    end
    if (avs_req.read) rdata_q <= mem[waddr];
  end

  always_ff @(posedge clk) begin
    if (rst) rvalid_q <= 1'b0;
    else     rvalid_q <= avs_req.read;
  end

  assign avs_rsp.readdata      = rdata_q;
  assign avs_rsp.readdatavalid = rvalid_q;
  assign avs_rsp.waitrequest   = 1'b0;

endmodule
