// Digital RF control board: a VME board carrying an FPGA, a DSP, memories and an
// ADC/DAC daughter board, built to stabilise the I and Q components of a cavity field.
// The board's parts meet on a local bus (24-bit word address, 32-bit data). Bus masters
// are the configuration controller, the VME interface and the DSP (brought out as a
// port: the processor itself is a bought-in part); an arbiter grants one at a time.
// The DSP is also a slave: transfers to its window leave the top on dsp_s_req and are
// answered on dsp_s_rsp (the DSP must not address its own window as a master).
// Slaves are the 4 MB static RAM, the 1.5 MB FLASH, the control and status registers,
// and the Xilinx chip, which runs the fast feedback loop between four ADC inputs and
// two DAC outputs and holds the sample buffers and the feed-forward table.
// All logic runs on one clock, the 4x IF sample clock of 47.6 MHz (11.9 MHz times 4,
// made by a PLL outside this logic). The Xilinx chip's logic is held in reset by the
// CSR reset bit or the board reset. The partition and the sizes follow the board
// description; the bus protocol, address map and register maps are this design's.
// Local-bus map (word addresses): 0x000000 static RAM, 0x200000 FLASH (one byte per
// word), 0x400000 CSR, 0x600000 DSP (as a slave), 0x800000 Xilinx chip. VME byte
// address = 4 x word address within the 64 MB board window.
module rf_board_top
  import lbus_pkg::*;
  import llrf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  // VMEbus
  input  logic [5:0]              vme_base,
  input  logic                    vme_as_n,
  input  logic                    vme_ds0_n,
  input  logic                    vme_write_n,
  input  logic [5:0]              vme_am,
  input  logic [31:2]             vme_addr,
  input  logic [31:0]             vme_data_i,
  output logic [31:0]             vme_data_o,
  output logic                    vme_data_oe,
  output logic                    vme_dtack_n,
  // DSP (local-bus master, local-bus slave and peripheral lines)
  input  lb_req_t                 dsp_req,
  output lb_rsp_t                 dsp_rsp,
  output lb_req_t                 dsp_s_req,
  input  lb_rsp_t                 dsp_s_rsp,
  output logic                    dsp_reset,
  output logic [3:0]              dsp_flag_o,
  output logic [3:0]              dsp_irq,
  input  logic [3:0]              dsp_flag_i,
  output logic [1:0]              dsp_dmar,
  input  logic [1:0]              dsp_dmag,
  // ADC/DAC daughter board
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc [4],
  output logic [DAC_W-1:0]        dac_data,
  output logic                    dac_sel,
  output logic                    dac_wr,
  // front panel and off-board resources
  input  logic                    ext_trig,
  output logic [3:0]              leds,
  input  logic [7:0]              dipsw,
  input  logic                    interlock_ok,
  input  logic                    turnmarker,
  output logic                    spi_sclk,
  output logic                    spi_mosi,
  output logic                    spi_cs_n,
  input  logic                    spi_miso,
  output logic                    step,
  output logic                    dir,
  // configuration stream to the Xilinx chip or the DSP
  output logic [7:0]              cfg_data,
  output logic                    cfg_wr,
  output logic                    cfg_target,
  output logic                    cfg_done,
  output logic                    pi_sat
);
  lb_req_t m_req [3];
  lb_rsp_t m_rsp [3];
  lb_req_t s_req [NS];
  lb_rsp_t s_rsp [NS];
  logic xlx_reset, event_trig;
  logic cfg_start, cfg_word_mode, cfg_tgt_sel, cfg_busy;
  logic [23:0] cfg_src, cfg_len;

  config_ctrl u_cfg (.clk, .rst, .start(cfg_start), .src_addr(cfg_src), .len(cfg_len),
    .word_mode(cfg_word_mode), .target_in(cfg_tgt_sel), .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .cfg_data, .cfg_wr, .cfg_target, .busy(cfg_busy), .done(cfg_done));

  vme_slave u_vme (.clk, .rst, .board_base(vme_base), .vme_as_n, .vme_ds0_n, .vme_write_n,
    .vme_am, .vme_addr, .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n,
    .m_req(m_req[1]), .m_rsp(m_rsp[1]));

  assign m_req[2] = dsp_req;
  assign dsp_rsp  = m_rsp[2];

  lbus_arbiter #(.NM(3)) u_arb (.clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp);  // slaves 0..4: SRAM, FLASH, CSR, Xilinx, DSP

  // the DSP's own memory as a slave, answered by the processor outside this logic
  assign dsp_s_req = s_req[4];
  assign s_rsp[4]  = dsp_s_rsp;

  sram u_sram (.clk, .rst, .req(s_req[0]), .rsp(s_rsp[0]));
  flash_mem u_flash (.clk, .rst, .req(s_req[1]), .rsp(s_rsp[1]));

  csr u_csr (.clk, .rst, .req(s_req[2]), .rsp(s_rsp[2]), .dsp_reset, .xlx_reset,
    .leds, .dipsw, .dsp_flag_o, .dsp_irq, .dsp_flag_i, .dsp_dmar, .dsp_dmag, .interlock_ok, .turnmarker,
    .event_trig, .spi_sclk, .spi_mosi, .spi_cs_n, .spi_miso, .step, .dir, .cfg_start,
    .cfg_src, .cfg_len, .cfg_word_mode, .cfg_target(cfg_tgt_sel), .cfg_busy, .cfg_done);

  fpga_core u_xlx (.clk, .rst(rst || xlx_reset), .req(s_req[3]), .rsp(s_rsp[3]),
    .adc_valid, .adc, .ext_trig, .event_trig, .dac_data, .dac_sel, .dac_wr, .pi_sat);
endmodule
