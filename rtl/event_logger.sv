// event_logger - hardware event logger: an Avalon-MM slave that timestamps
// software events with a cycle counter and keeps them in on-chip memory.
//
// Software logs an event with one store to EVENT_WRITE carrying
// {event_type[15:8], task_id[7:0]}. In the cycle that write is on the bus the
// logger stores {cycle_count, 16'b0, event_type, task_id} at the write
// pointer of a DEPTH-entry buffer and bumps the entry count. The buffer is
// linear, not a ring: once DEPTH entries are held, further events are dropped
// and the sticky overflow flag is set, so no stored entry is ever lost.
//
// Readout walks the buffer with a separate read pointer: EVENT_READ_LO
// returns the timestamp of the entry at the read pointer, EVENT_READ_HI its
// {event_type, task_id} and then moves the pointer on. STATUS returns
// {full[17], overflow[16], entry_count[8:0]}; entry_count is the number of
// entries captured since the last clear and is not lowered by reading.
// Writing 1 to CONTROL[0] empties the buffer (both pointers, the count and
// the overflow flag go to zero) and restarts the cycle counter from zero.
//
// Registers (word offsets): 0 EVENT_WRITE (W), 1 EVENT_READ_LO (R),
// 2 EVENT_READ_HI (R), 3 STATUS (R), 4 CONTROL (W).
//
// Interface timing: waitrequest is always low, so every access takes one bus
// cycle; read data is returned with readdatavalid exactly one cycle after the
// read. The event is captured in the cycle of the write itself.
//
// Follows the specification: register map, entry layout, capture algorithm,
// overflow policy, sizes. This design's own choices: the buffer is read
// through a registered memory port whose address is the read pointer's next
// value, so consecutive LO/HI reads always see the current entry; reads past
// the last captured entry return zero and do not move the pointer;
// write-only registers read as zero; byte enables are ignored (the registers
// are written as whole words).
module event_logger
  import avmm_pkg::*;
  import evlog_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned TS_WIDTH = 32,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned CW      = AW + 1
) (
  input  logic      clk,
  input  logic      rst,
  input  avmm_req_t avs_req,
  output avmm_rsp_t avs_rsp
);

  logic [2:0] reg_addr;
  logic       wr_event, wr_clear, rd_hi;

  assign reg_addr = avs_req.address[2:0];
  assign wr_event = avs_req.write && (reg_addr == REG_EVENT_WRITE);
  assign wr_clear = avs_req.write && (reg_addr == REG_CONTROL)
                    && avs_req.writedata[CONTROL_CLEAR_BIT];
  assign rd_hi    = avs_req.read && (reg_addr == REG_EVENT_READ_HI);

  // ---------------------------------------------------------------- counter
  logic [TS_WIDTH-1:0] cycle_count;

  cycle_counter #(.WIDTH(TS_WIDTH)) u_counter (
    .clk  (clk),
    .rst  (rst),
    .clear(wr_clear),
    .count(cycle_count)
  );

  // ------------------------------------------------------ pointers and flags
  logic [CW-1:0] entry_count;   // also the write pointer
  logic [CW-1:0] rd_ptr, rd_ptr_next;
  logic          overflow;
  logic          full, rd_avail;

  assign full     = (entry_count == CW'(DEPTH));
  assign rd_avail = (rd_ptr < entry_count);

  always_comb begin
    rd_ptr_next = rd_ptr;
    if (wr_clear)                rd_ptr_next = '0;
    else if (rd_hi && rd_avail)  rd_ptr_next = rd_ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || wr_clear) begin
      entry_count <= '0;
      overflow    <= 1'b0;
    end else if (wr_event) begin
      if (!full) entry_count <= entry_count + 1'b1;
      else       overflow    <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rd_ptr <= '0;
    else     rd_ptr <= rd_ptr_next;
  end

  // ------------------------------------------------------------------ buffer
  entry_t new_entry, cur_entry;
  logic [63:0] cur_word;

  always_comb begin
    new_entry            = '0;
    new_entry.timestamp  = 32'(cycle_count);
    new_entry.event_type = avs_req.writedata[15:8];
    new_entry.task_id    = avs_req.writedata[7:0];
  end

  event_buffer #(.DEPTH(DEPTH), .WIDTH(64)) u_buffer (
    .clk  (clk),
    .we   (wr_event && !full),
    .waddr(entry_count[AW-1:0]),
    .wdata(new_entry),
    .raddr(rd_ptr_next[AW-1:0]),
    .rdata(cur_word)
  );

  assign cur_entry = entry_t'(cur_word);

  // ---------------------------------------------------------------- readback
  logic [31:0] rdata_d, rdata_q;
  logic        rvalid_q;

  always_comb begin
    rdata_d = '0;
    unique case (reg_addr)
      REG_EVENT_READ_LO: if (rd_avail) rdata_d = cur_entry.timestamp;
      REG_EVENT_READ_HI: if (rd_avail) rdata_d = {16'h0, cur_entry.event_type, cur_entry.task_id};
      REG_STATUS: begin
        rdata_d[STATUS_FULL_BIT]          = full;
        rdata_d[STATUS_OVERFLOW_BIT]      = overflow;
        rdata_d[STATUS_COUNT_W-1:0]       = STATUS_COUNT_W'(entry_count);
      end
      default: rdata_d = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rvalid_q <= avs_req.read;
      if (avs_req.read) rdata_q <= rdata_d;
    end
  end

  assign avs_rsp.readdata      = rdata_q;
  assign avs_rsp.readdatavalid = rvalid_q;
  assign avs_rsp.waitrequest   = 1'b0;

  // A slave never sees a read and a write in the same cycle.
  a_rw_exclusive : assert property (@(posedge clk) disable iff (rst)
    !(avs_req.read && avs_req.write));

endmodule
