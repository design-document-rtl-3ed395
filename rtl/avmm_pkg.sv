// avmm_pkg - signal bundles of the 32-bit Avalon-MM bus that links the CPU
// masters to the slaves of the event-logger system.
//
// A request carries an address, read and write strobes, write data and byte
// enables. On the master side the address is a byte address; on the slave
// side the interconnect hands each slave a word address relative to the
// slave's base (the bus is word-addressed, 32 bits wide).
//
// Timing rules used throughout (this design's choice of Avalon-MM subset):
//   * a request is accepted in a cycle where read or write is high and
//     waitrequest is low; the master holds the request unchanged until then;
//   * read data returns later with readdatavalid high for exactly one cycle;
//     every slave built here answers one cycle after acceptance;
//   * writes are posted: no response.
package avmm_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned BE_W   = DATA_W / 8;

  typedef struct packed {
    logic [ADDR_W-1:0] address;
    logic              read;
    logic              write;
    logic [DATA_W-1:0] writedata;
    logic [BE_W-1:0]   byteenable;
  } avmm_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] readdata;
    logic              readdatavalid;
    logic              waitrequest;
  } avmm_rsp_t;

  localparam avmm_req_t AVMM_REQ_IDLE = '{default: '0};

endpackage
