// avmm_interconnect - 32-bit, word-addressed Avalon-MM fabric between the
// CPU's two masters and the system's four slaves.
//
// Masters: instruction (index 0) and data (index 1), byte-addressed.
// Slaves and their byte-address windows:
//   on-chip RAM   RAM_BASE    .. +64 KB   instruction and data master
//   SYSID         SYSID_BASE  .. +8 B     data master only
//   event logger  LOGGER_BASE .. +32 B    data master only (5 registers)
//   JTAG UART     UART_BASE   .. +8 B     data master only
// Each slave receives a word address relative to its base.
//
// How it works:
//   * Decoding: each master's byte address picks one slave. An address that
//     hits no window (or a slave the master is not wired to) is taken by a
//     built-in default slave: writes are dropped, reads return zero.
//   * Arbitration: the RAM is the only slave both masters reach. When both
//     ask for it in the same cycle, a round-robin arbiter grants one and holds
//     waitrequest high to the other; the loser wins the next contest.
//   * Responses: each master may have one read outstanding. Until its data
//     returns, a new request from that master waits (waitrequest high), so
//     responses always reach the master in order. Data arriving in a cycle
//     frees the master to issue again in that same cycle. The RAM's data is
//     steered by an owner register, which relies on the RAM answering one
//     cycle after the read (true for onchip_ram).
//   * A slave's own waitrequest is passed back to the granted master.
//
// The logger's base address follows the system's register map; the other
// base addresses, the default slave, the round-robin policy and the
// one-outstanding-read rule are this design's choices.
module avmm_interconnect
  import avmm_pkg::*;
#(
  parameter logic [31:0] RAM_BASE    = 32'h0000_0000,
  parameter int unsigned RAM_SPAN    = 65536,
  parameter logic [31:0] SYSID_BASE  = 32'h0002_0000,
  parameter logic [31:0] LOGGER_BASE = 32'h0002_0040,
  parameter logic [31:0] UART_BASE   = 32'h0002_0060
) (
  input  logic      clk,
  input  logic      rst,
  // masters
  input  avmm_req_t instr_req,
  output avmm_rsp_t instr_rsp,
  input  avmm_req_t data_req,
  output avmm_rsp_t data_rsp,
  // slaves
  output avmm_req_t ram_req,
  input  avmm_rsp_t ram_rsp,
  output avmm_req_t sysid_req,
  input  avmm_rsp_t sysid_rsp,
  output avmm_req_t logger_req,
  input  avmm_rsp_t logger_rsp,
  output avmm_req_t uart_req,
  input  avmm_rsp_t uart_rsp
);

  localparam int unsigned SYSID_SPAN  = 8;
  localparam int unsigned LOGGER_SPAN = 32;
  localparam int unsigned UART_SPAN   = 8;

  typedef enum logic [2:0] {S_RAM, S_SYSID, S_LOGGER, S_UART, S_NONE} slave_e;

  localparam int unsigned M_INSTR = 0;
  localparam int unsigned M_DATA  = 1;

  function automatic logic in_window(logic [31:0] a, logic [31:0] base, int unsigned span);
    return (a >= base) && ((a - base) < 32'(span));
  endfunction

  function automatic slave_e decode(logic [31:0] a, logic data_master);
    if (in_window(a, RAM_BASE, RAM_SPAN))                         return S_RAM;
    if (data_master && in_window(a, SYSID_BASE, SYSID_SPAN))      return S_SYSID;
    if (data_master && in_window(a, LOGGER_BASE, LOGGER_SPAN))    return S_LOGGER;
    if (data_master && in_window(a, UART_BASE, UART_SPAN))        return S_UART;
    return S_NONE;
  endfunction

  function automatic avmm_req_t to_slave(avmm_req_t r, logic [31:0] base);
    avmm_req_t s;
    s         = r;
    s.address = (r.address - base) >> 2;
    return s;
  endfunction

  avmm_req_t m_req [2];
  avmm_rsp_t m_rsp [2];
  slave_e    m_sel [2];
  logic      m_req_any [2];
  logic      m_rsp_here [2];
  logic      m_blocked [2];
  logic      m_accept [2];

  logic      pending_q [2];
  slave_e    pend_sel_q [2];
  logic      dflt_valid_q [2];

  assign m_req[M_INSTR] = instr_req;
  assign m_req[M_DATA]  = data_req;
  assign instr_rsp      = m_rsp[M_INSTR];
  assign data_rsp       = m_rsp[M_DATA];

  // ----------------------------------------------------------------- decode
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      m_sel[m]     = decode(m_req[m].address, m == M_DATA);
      m_req_any[m] = m_req[m].read || m_req[m].write;
    end
  end

  // --------------------------------------------------- response steering
  logic ram_owner_q;   // master whose RAM read is in flight

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      m_rsp[m].readdata      = '0;
      m_rsp[m].readdatavalid = 1'b0;
      if (pending_q[m]) begin
        unique case (pend_sel_q[m])
          S_RAM: if (ram_rsp.readdatavalid && (ram_owner_q == 1'(m))) begin
            m_rsp[m].readdatavalid = 1'b1;
            m_rsp[m].readdata      = ram_rsp.readdata;
          end
          S_SYSID: begin
            m_rsp[m].readdatavalid = sysid_rsp.readdatavalid;
            m_rsp[m].readdata      = sysid_rsp.readdata;
          end
          S_LOGGER: begin
            m_rsp[m].readdatavalid = logger_rsp.readdatavalid;
            m_rsp[m].readdata      = logger_rsp.readdata;
          end
          S_UART: begin
            m_rsp[m].readdatavalid = uart_rsp.readdatavalid;
            m_rsp[m].readdata      = uart_rsp.readdata;
          end
          default: m_rsp[m].readdatavalid = dflt_valid_q[m];
        endcase
      end
      m_rsp_here[m] = m_rsp[m].readdatavalid;
      m_blocked[m]  = pending_q[m] && !m_rsp_here[m];
    end
  end

  // ------------------------------------------------------------ arbitration
  logic ram_want [2];
  logic ram_gnt  [2];
  logic rr_last_q;     // master granted the RAM last time both wanted it

  always_comb begin
    for (int m = 0; m < 2; m++)
      ram_want[m] = m_req_any[m] && !m_blocked[m] && (m_sel[m] == S_RAM);
    ram_gnt[M_INSTR] = ram_want[M_INSTR] && (!ram_want[M_DATA] || rr_last_q == 1'(M_DATA));
    ram_gnt[M_DATA]  = ram_want[M_DATA]  && (!ram_want[M_INSTR] || rr_last_q == 1'(M_INSTR));
  end

  // --------------------------------------------------------- slave requests
  logic d_go;
  assign d_go = m_req_any[M_DATA] && !m_blocked[M_DATA];

  always_comb begin
    ram_req    = AVMM_REQ_IDLE;
    sysid_req  = AVMM_REQ_IDLE;
    logger_req = AVMM_REQ_IDLE;
    uart_req   = AVMM_REQ_IDLE;
    if (ram_gnt[M_DATA])       ram_req = to_slave(m_req[M_DATA], RAM_BASE);
    else if (ram_gnt[M_INSTR]) ram_req = to_slave(m_req[M_INSTR], RAM_BASE);
    if (d_go && m_sel[M_DATA] == S_SYSID)  sysid_req  = to_slave(m_req[M_DATA], SYSID_BASE);
    if (d_go && m_sel[M_DATA] == S_LOGGER) logger_req = to_slave(m_req[M_DATA], LOGGER_BASE);
    if (d_go && m_sel[M_DATA] == S_UART)   uart_req   = to_slave(m_req[M_DATA], UART_BASE);
  end

  // ------------------------------------------------------------- acceptance
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      m_accept[m] = 1'b0;
      if (m_req_any[m] && !m_blocked[m]) begin
        unique case (m_sel[m])
          S_RAM:    m_accept[m] = ram_gnt[m] && !ram_rsp.waitrequest;
          S_SYSID:  m_accept[m] = !sysid_rsp.waitrequest;
          S_LOGGER: m_accept[m] = !logger_rsp.waitrequest;
          S_UART:   m_accept[m] = !uart_rsp.waitrequest;
          default:  m_accept[m] = 1'b1;
        endcase
      end
      m_rsp[m].waitrequest = m_req_any[m] && !m_accept[m];
    end
  end

  // ------------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (rst) begin
      rr_last_q   <= 1'b0;
      ram_owner_q <= 1'b0;
      for (int m = 0; m < 2; m++) begin
        pending_q[m]    <= 1'b0;
        pend_sel_q[m]   <= S_NONE;
        dflt_valid_q[m] <= 1'b0;
      end
    end else begin
      if (ram_want[M_INSTR] && ram_want[M_DATA])
        rr_last_q <= ram_gnt[M_DATA];
      if (ram_gnt[M_DATA] && m_accept[M_DATA] && m_req[M_DATA].read)
        ram_owner_q <= 1'(M_DATA);
      else if (ram_gnt[M_INSTR] && m_accept[M_INSTR] && m_req[M_INSTR].read)
        ram_owner_q <= 1'(M_INSTR);
      for (int m = 0; m < 2; m++) begin
        dflt_valid_q[m] <= m_accept[m] && m_req[m].read && (m_sel[m] == S_NONE);
        if (m_accept[m] && m_req[m].read) begin
          pending_q[m]  <= 1'b1;
          pend_sel_q[m] <= m_sel[m];
        end else if (m_rsp_here[m]) begin
          pending_q[m]  <= 1'b0;
        end
      end
    end
  end

  // A master does not read and write in the same cycle.
  a_instr_rw : assert property (@(posedge clk) disable iff (rst)
    !(instr_req.read && instr_req.write));
  a_data_rw : assert property (@(posedge clk) disable iff (rst)
    !(data_req.read && data_req.write));
  // A master holds a stalled request unchanged until it is accepted.
  a_instr_hold : assert property (@(posedge clk) disable iff (rst)
    (instr_req.read || instr_req.write) && instr_rsp.waitrequest |=> $stable(instr_req));
  a_data_hold : assert property (@(posedge clk) disable iff (rst)
    (data_req.read || data_req.write) && data_rsp.waitrequest |=> $stable(data_req));
  // The RAM is never granted to both masters at once.
  a_ram_onehot : assert property (@(posedge clk) disable iff (rst)
    !(ram_gnt[M_INSTR] && ram_gnt[M_DATA]));

endmodule
