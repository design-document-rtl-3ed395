// sysid - system identification register.
//
// A read-only Avalon-MM slave that lets software check it is running on the
// hardware it was built for: a read of word offset 0 returns SYSTEM_ID, any
// other offset reads as zero, writes are ignored. Read data comes back with
// readdatavalid one cycle after the read; waitrequest is always low.
//
// The block's presence and role follow the system description; the single
// register, its offset and the ID value are this design's choices.
module sysid
  import avmm_pkg::*;
#(
  parameter logic [31:0] SYSTEM_ID = 32'h0002_0040
) (
  input  logic      clk,
  input  logic      rst,
  input  avmm_req_t avs_req,
  output avmm_rsp_t avs_rsp
);

  logic [31:0] rdata_q;
  logic        rvalid_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rvalid_q <= avs_req.read;
      if (avs_req.read) rdata_q <= (avs_req.address == '0) ? SYSTEM_ID : 32'h0;
    end
  end

  assign avs_rsp.readdata      = rdata_q;
  assign avs_rsp.readdatavalid = rvalid_q;
  assign avs_rsp.waitrequest   = 1'b0;

endmodule
