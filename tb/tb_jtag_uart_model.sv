// tb_jtag_uart_model - behavioural model of the JTAG UART's Avalon-MM slave
// for the system testbench.
//
// Word 0 (DATA): a write pushes writedata[7:0] into a 64-byte transmit FIFO
// (dropped if the FIFO is full). Word 1 (CONTROL): a read returns the free
// FIFO space in bits [31:16]. The FIFO drains one character every DRAIN
// cycles into `host_text`, standing in for the host terminal. waitrequest is
// raised at random; reads answer one cycle after acceptance.
module tb_jtag_uart_model
  import avmm_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned DRAIN = 3
) (
  input  logic      clk,
  input  logic      rst,
  input  avmm_req_t req,
  output avmm_rsp_t rsp,
  output int        stalls,
  output int        full_seen
);
  byte   fifo [$];
  string host_text = "";
  int    drain_cnt = 0;
  logic  wait_q;

  initial begin stalls = 0; full_seen = 0; end

  assign rsp.waitrequest = wait_q;

  always @(posedge clk) begin
    wait_q            <= rst ? 1'b0 : ($urandom_range(0, 3) == 0);
    rsp.readdatavalid <= 1'b0;
    if ((req.read || req.write) && wait_q) stalls <= stalls + 1;
    if (!rst && !wait_q) begin
      if (req.write && req.address[0] == 1'b0) begin
        if (fifo.size() < DEPTH) fifo.push_back(byte'(req.writedata[7:0]));
      end
      if (req.read) begin
        rsp.readdatavalid <= 1'b1;
        rsp.readdata      <= (req.address[0] == 1'b1) ? {16'(DEPTH - fifo.size()), 16'h0} : 32'h0;
        if (fifo.size() == DEPTH) full_seen <= full_seen + 1;
      end
    end
    if (fifo.size() > 0) begin
      drain_cnt <= drain_cnt + 1;
      if (drain_cnt >= DRAIN - 1) begin
        drain_cnt <= 0;
        host_text = {host_text, string'(fifo.pop_front())};
      end
    end
  end
endmodule
