// axil2avmm - adapter from one AXI4-Lite master (the CPU side) to one
// Avalon-MM master port of the interconnect.
//
// It carries one transaction at a time:
//   IDLE   takes a read (AR) or a write (AW and W together, both valid); when
//          both are offered the one not served last time goes first.
//   BUS    presents the Avalon read or write (byte address, wstrb as
//          byteenable) and holds it while waitrequest is high.
//   RWAIT  waits for readdatavalid and keeps the data.
//   RESP   drives R (rvalid) or B (bvalid) until the CPU takes it.
// ARREADY, AWREADY and WREADY are high only in IDLE, in the cycle the
// request is taken. Responses are always OKAY: unmapped addresses are
// handled by the interconnect's default slave, which reads as zero.
//
// Timing: a write reaches the Avalon side one cycle after its AXI handshake,
// and B follows in the cycle after the Avalon write is accepted; a read
// whose slave answers in one cycle returns R three cycles after AR.
//
// That the CPU's masters are AXI4-Lite and the system bus is Avalon-MM
// follows the system description; the adapter's structure is this design's.
// The AXI protection bits carry no meaning on this bus and are not used.
module axil2avmm
  import axil_pkg::*;
  import avmm_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  output avmm_req_t avm_req,
  input  avmm_rsp_t avm_rsp
);

  typedef enum logic [1:0] {IDLE, BUS, RWAIT, RESP} state_e;

  state_e      state_q;
  logic        is_read_q;
  logic        last_was_read_q;
  avmm_req_t   cmd_q;
  logic [31:0] rdata_q;

  logic take_rd, take_wr;
  logic wr_offered;

  assign wr_offered = axi_req.awvalid && axi_req.wvalid;
  always_comb begin
    take_rd = 1'b0;
    take_wr = 1'b0;
    if (state_q == IDLE) begin
      if (axi_req.arvalid && wr_offered) begin
        take_rd = !last_was_read_q;
        take_wr =  last_was_read_q;
      end else begin
        take_rd = axi_req.arvalid;
        take_wr = wr_offered;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q         <= IDLE;
      is_read_q       <= 1'b0;
      last_was_read_q <= 1'b0;
      cmd_q           <= AVMM_REQ_IDLE;
      rdata_q         <= '0;
    end else begin
      unique case (state_q)
        IDLE: begin
          if (take_rd) begin
            cmd_q            <= AVMM_REQ_IDLE;
            cmd_q.address    <= axi_req.araddr;
            cmd_q.read       <= 1'b1;
            cmd_q.byteenable <= '1;
            is_read_q        <= 1'b1;
            last_was_read_q  <= 1'b1;
            state_q          <= BUS;
          end else if (take_wr) begin
            cmd_q            <= AVMM_REQ_IDLE;
            cmd_q.address    <= axi_req.awaddr;
            cmd_q.write      <= 1'b1;
            cmd_q.writedata  <= axi_req.wdata;
            cmd_q.byteenable <= axi_req.wstrb;
            is_read_q        <= 1'b0;
            last_was_read_q  <= 1'b0;
            state_q          <= BUS;
          end
        end
        BUS: begin
          if (!avm_rsp.waitrequest) begin
            cmd_q.read  <= 1'b0;
            cmd_q.write <= 1'b0;
            state_q     <= is_read_q ? RWAIT : RESP;
          end
        end
        RWAIT: begin
          if (avm_rsp.readdatavalid) begin
            rdata_q <= avm_rsp.readdata;
            state_q <= RESP;
          end
        end
        RESP: begin
          if (( is_read_q && axi_req.rready) || (!is_read_q && axi_req.bready))
            state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign avm_req = cmd_q;

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.arready = take_rd;
    axi_rsp.awready = take_wr;
    axi_rsp.wready  = take_wr;
    axi_rsp.rvalid  = (state_q == RESP) &&  is_read_q;
    axi_rsp.rdata   = rdata_q;
    axi_rsp.rresp   = RESP_OKAY;
    axi_rsp.bvalid  = (state_q == RESP) && !is_read_q;
    axi_rsp.bresp   = RESP_OKAY;
  end

  // AXI: a raised valid stays up until its handshake.
  a_ar_stable : assert property (@(posedge clk) disable iff (rst)
    axi_req.arvalid && !axi_rsp.arready |=> axi_req.arvalid);
  a_aw_stable : assert property (@(posedge clk) disable iff (rst)
    axi_req.awvalid && !axi_rsp.awready |=> axi_req.awvalid);
  a_w_stable  : assert property (@(posedge clk) disable iff (rst)
    axi_req.wvalid && !axi_rsp.wready |=> axi_req.wvalid);

endmodule
