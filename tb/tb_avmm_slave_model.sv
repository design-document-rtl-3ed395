// tb_avmm_slave_model - memory-like Avalon-MM slave for testbenches.
//
// Holds 64 words indexed by the low bits of the address; writes honour the
// byte enables. Reads answer
// with readdatavalid after LATENCY cycles (1 for the fast slaves); when
// RANDOM_WAIT is set it also raises waitrequest at random, as a slow
// peripheral would. It counts the cycles in which it stalled a request.
module tb_avmm_slave_model
  import avmm_pkg::*;
#(
  parameter int unsigned LATENCY     = 1,
  parameter bit          RANDOM_WAIT = 1'b0
) (
  input  logic      clk,
  input  logic      rst,
  input  avmm_req_t req,
  output avmm_rsp_t rsp,
  output int        stalls,
  output int        reads,
  output int        writes
);
  logic [31:0] mem [64];
  logic        wait_q;
  logic [31:0] pipe_d [LATENCY];
  logic        pipe_v [LATENCY];

  initial foreach (mem[i]) mem[i] = 32'h0;
  initial begin stalls = 0; reads = 0; writes = 0; end

  always @(posedge clk) begin
    wait_q <= RANDOM_WAIT ? ($urandom_range(0, 2) == 0) : 1'b0;
    if (rst) wait_q <= 1'b0;
  end

  assign rsp.waitrequest   = wait_q;
  assign rsp.readdatavalid = pipe_v[LATENCY-1];
  assign rsp.readdata      = pipe_d[LATENCY-1];

  always @(posedge clk) begin
    if ((req.read || req.write) && wait_q) stalls <= stalls + 1;
    if (req.write && !wait_q) begin
      for (int b = 0; b < 4; b++)
        if (req.byteenable[b]) mem[req.address[5:0]][8*b +: 8] <= req.writedata[8*b +: 8];
      writes <= writes + 1;
    end
    if (req.read && !wait_q) reads <= reads + 1;
    pipe_v[0] <= !rst && req.read && !wait_q;
    pipe_d[0] <= mem[req.address[5:0]];
    for (int i = 1; i < LATENCY; i++) begin
      pipe_v[i] <= !rst && pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
  end
endmodule
