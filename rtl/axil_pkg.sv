// axil_pkg - signal bundles of an AXI4-Lite master port (32-bit address and
// data), the protocol of the CPU's instruction and data masters.
//
// axil_req_t carries everything the master drives (AW, W, AR valid/payload
// and the B/R ready signals); axil_rsp_t everything the slave drives (AW, W,
// AR ready, and the B and R channels).
package axil_pkg;

  localparam logic [1:0] RESP_OKAY = 2'b00;

  typedef struct packed {
    logic [31:0] awaddr;
    logic [2:0]  awprot;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic [2:0]  arprot;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  localparam axil_req_t AXIL_REQ_IDLE = '{default: '0};

endpackage
