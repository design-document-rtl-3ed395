// event_logger_soc - FPGA system for measuring task timing on a soft-core
// CPU: on-chip RAM, hardware event logger and system ID on one Avalon-MM
// interconnect, with a reset bridge.
//
// The CPU (instruction and data masters), the JTAG UART and the PLL are not
// part of this module: the CPU's two AXI4-Lite masters enter as ports, each
// through an AXI4-Lite to Avalon-MM adapter (axil2avmm); the JTAG UART's
// slave port leaves as ports; `clk` is the PLL's 100 MHz output. The
// active-low push-button reset enters as `btn_reset_n`; the reset bridge
// turns it into `sys_rst`, which drives every block inside and is brought out
// for the CPU and the UART.
//
// Software logs an event with one 32-bit store to the logger at byte address
// 0x0002_0040 (EVENT_WRITE). The logger stamps it with the cycle count of
// the cycle the store reaches it on the Avalon side (one cycle after the AXI
// write handshake when the bus is free), so the time between two events is
// measured in 10 ns cycles with no software overhead beyond the stores.
//
// Address map (byte addresses, data master):
//   0x0000_0000 - 0x0000_FFFF  on-chip RAM, 64 KB (also the instruction master)
//   0x0002_0000 - 0x0002_0007  SYSID
//   0x0002_0040 - 0x0002_005F  event logger (5 word registers)
//   0x0002_0060 - 0x0002_0067  JTAG UART (external)
// The logger's base, the RAM size, the logger's size, the set of blocks and
// the AXI4-Lite CPU masters follow the system description; the other base
// addresses and the adapters' design are this design's.
module event_logger_soc
  import avmm_pkg::*;
  import axil_pkg::*;
#(
  parameter int unsigned LOG_DEPTH      = 256,
  parameter int unsigned RAM_SIZE_BYTES = 65536
) (
  input  logic      clk,
  input  logic      btn_reset_n,
  output logic      sys_rst,
  // CPU masters (AXI4-Lite)
  input  axil_req_t cpu_instr_req,
  output axil_rsp_t cpu_instr_rsp,
  input  axil_req_t cpu_data_req,
  output axil_rsp_t cpu_data_rsp,
  // JTAG UART slave port
  output avmm_req_t uart_req,
  input  avmm_rsp_t uart_rsp
);

  avmm_req_t instr_req, data_req, ram_req, sysid_req, logger_req;
  avmm_rsp_t instr_rsp, data_rsp, ram_rsp, sysid_rsp, logger_rsp;

  reset_bridge u_reset_bridge (
    .clk     (clk),
    .rst_n_in(btn_reset_n),
    .rst_out (sys_rst)
  );

  axil2avmm u_instr_bridge (
    .clk    (clk),
    .rst    (sys_rst),
    .axi_req(cpu_instr_req),
    .axi_rsp(cpu_instr_rsp),
    .avm_req(instr_req),
    .avm_rsp(instr_rsp)
  );

  axil2avmm u_data_bridge (
    .clk    (clk),
    .rst    (sys_rst),
    .axi_req(cpu_data_req),
    .axi_rsp(cpu_data_rsp),
    .avm_req(data_req),
    .avm_rsp(data_rsp)
  );

  avmm_interconnect #(.RAM_SPAN(RAM_SIZE_BYTES)) u_interconnect (
    .clk       (clk),
    .rst       (sys_rst),
    .instr_req (instr_req),
    .instr_rsp (instr_rsp),
    .data_req  (data_req),
    .data_rsp  (data_rsp),
    .ram_req   (ram_req),
    .ram_rsp   (ram_rsp),
    .sysid_req (sysid_req),
    .sysid_rsp (sysid_rsp),
    .logger_req(logger_req),
    .logger_rsp(logger_rsp),
    .uart_req  (uart_req),
    .uart_rsp  (uart_rsp)
  );

  onchip_ram #(.SIZE_BYTES(RAM_SIZE_BYTES)) u_ram (
    .clk    (clk),
    .rst    (sys_rst),
    .avs_req(ram_req),
    .avs_rsp(ram_rsp)
  );

  event_logger #(.DEPTH(LOG_DEPTH)) u_logger (
    .clk    (clk),
    .rst    (sys_rst),
    .avs_req(logger_req),
    .avs_rsp(logger_rsp)
  );

  sysid u_sysid (
    .clk    (clk),
    .rst    (sys_rst),
    .avs_req(sysid_req),
    .avs_rsp(sysid_rsp)
  );

endmodule
