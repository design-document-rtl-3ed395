// evlog_pkg - register map, event codes and buffer-entry layout of the
// hardware event logger.
//
// Register offsets are 32-bit word offsets from the logger's base address
// (0x0002_0040 in the system map). The event codes and the 64-bit entry
// layout {timestamp[63:32], reserved[31:16], event_type[15:8], task_id[7:0]}
// follow the logger's specification; the reserved field is always zero.
package evlog_pkg;

  // Word offsets of the five registers.
  localparam logic [2:0] REG_EVENT_WRITE   = 3'd0;  // write-only
  localparam logic [2:0] REG_EVENT_READ_LO = 3'd1;  // read-only, timestamp
  localparam logic [2:0] REG_EVENT_READ_HI = 3'd2;  // read-only, info; advances read pointer
  localparam logic [2:0] REG_STATUS        = 3'd3;  // read-only
  localparam logic [2:0] REG_CONTROL       = 3'd4;  // write-only

  // STATUS bit positions.
  localparam int unsigned STATUS_FULL_BIT     = 17;
  localparam int unsigned STATUS_OVERFLOW_BIT = 16;
  localparam int unsigned STATUS_COUNT_W      = 9;   // [8:0] entry_count

  // CONTROL bit positions.
  localparam int unsigned CONTROL_CLEAR_BIT = 0;

  typedef enum logic [7:0] {
    EVT_TASK_START     = 8'h01,
    EVT_TASK_END       = 8'h02,
    EVT_CONTEXT_SWITCH = 8'h03
  } event_type_e;

  // One buffer entry (64 bits).
  typedef struct packed {
    logic [31:0] timestamp;
    logic [15:0] reserved;
    logic [7:0]  event_type;
    logic [7:0]  task_id;
  } entry_t;

endpackage
