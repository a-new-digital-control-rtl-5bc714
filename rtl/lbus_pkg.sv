// Local-bus package: types and address map shared by every bus master and slave.
// The board's local bus carries a 24-bit address of 32-bit entities and 32-bit data;
// those widths follow the board description. The handshake is this design's own:
// a master raises cyc with we/addr/wdata and holds them until the selected slave
// answers with a one-cycle ack (with rdata on reads). The address map below is also
// this design's choice.
package lbus_pkg;
  localparam int LB_AW = 24;
  localparam int LB_DW = 32;

  typedef struct packed {
    logic             cyc;
    logic             we;
    logic [LB_AW-1:0] addr;
    logic [LB_DW-1:0] wdata;
  } lb_req_t;

  typedef struct packed {
    logic             ack;
    logic [LB_DW-1:0] rdata;
  } lb_rsp_t;

  // Address map (word addresses)
  localparam logic [LB_AW-1:0] SRAM_BASE  = 24'h00_0000; // 1M words
  localparam logic [LB_AW-1:0] FLASH_BASE = 24'h20_0000; // 1.5M bytes, one per word
  localparam logic [LB_AW-1:0] CSR_BASE   = 24'h40_0000; // 256 registers
  localparam logic [LB_AW-1:0] DSP_BASE   = 24'h60_0000; // DSP as a slave, 1M words
  localparam logic [LB_AW-1:0] XLX_BASE   = 24'h80_0000; // Xilinx chip, 8M words
  localparam int NS = 5;                                   // number of slaves

  typedef enum logic [2:0] {
    SL_SRAM, SL_FLASH, SL_CSR, SL_XLX, SL_DSP, SL_NONE
  } slave_e;

  function automatic slave_e decode(input logic [LB_AW-1:0] a);
    if (a[23])                  return SL_XLX;
    else if (a[23:20] == 4'h0)  return SL_SRAM;
    else if (a[23:21] == 3'b001 && a[20:0] < 21'h18_0000) return SL_FLASH;
    else if (a[23:8] == 16'h4000) return SL_CSR;
    else if (a[23:20] == 4'h6)  return SL_DSP;
    else                        return SL_NONE;
  endfunction

  localparam lb_req_t LB_IDLE = '{cyc: 1'b0, we: 1'b0, addr: '0, wdata: '0};
endpackage
