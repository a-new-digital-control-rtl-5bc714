// Control and status registers (the board's I/O control chip), a local-bus slave.
// On-board: reset lines of the DSP and the Xilinx chip, front-panel LEDs, the
// configuration dipswitch, and DSP peripheral control (I/O flags, interrupts, DMA).
// Off-board: the stepper-motor interface of the cavity tuner, the SPI interface of the
// frequency synthesizer, the CESR turnmarker (counted), the interlock system (status
// and a latched trip flag) and event triggers (a write sends a one-cycle pulse). It
// also starts the configuration controller. The list of resources follows the board
// description; the register map below is this design's:
//   0 CTRL      rw [0] DSP reset, [1] Xilinx reset, [7:4] LEDs
//   1 STATUS    r  [7:0] dipswitch, [8] interlock ok, [9] interlock tripped (latched),
//                  [10] SPI busy, [11] stepper busy, [12] config busy, [13] config done
//   2 DSP_OUT   rw [3:0] DSP flag inputs, [7:4] DSP interrupt lines, [9:8] DSP DMA requests
//   3 DSP_IN    r  [3:0] DSP flag outputs, [5:4] DSP DMA grants
//   4 EVENT     w  any write: event trigger pulse; write bit 0 = 1 also clears the trip latch
//   5 SPI_TX    w  starts a transfer      6 SPI_RX r    7 SPI_DIV rw
//   8 STEP_CMD  w  [15:0] steps, [16] direction (starts a move)
//   9 STEP_PER  rw 10 STEP_POS r          11 TURNS r (turnmarker count)
//  12 CFG_SRC   rw 13 CFG_LEN rw          14 CFG_CMD w [0] start, [1] target DSP, [2] word mode
// CFG_SRC resets to the start of the Xilinx image in FLASH (the second third of it).
// Timing: transfers are acknowledged one cycle after cyc.
module csr
  import lbus_pkg::*;
#(
  parameter int SPI_WORD = 24
) (
  input  logic        clk,
  input  logic        rst,
  input  lb_req_t     req,
  output lb_rsp_t     rsp,
  output logic        dsp_reset,
  output logic        xlx_reset,
  output logic [3:0]  leds,
  input  logic [7:0]  dipsw,
  output logic [3:0]  dsp_flag_o,
  output logic [3:0]  dsp_irq,
  input  logic [3:0]  dsp_flag_i,
  output logic [1:0]  dsp_dmar,
  input  logic [1:0]  dsp_dmag,
  input  logic        interlock_ok,
  input  logic        turnmarker,
  output logic        event_trig,
  output logic        spi_sclk,
  output logic        spi_mosi,
  output logic        spi_cs_n,
  input  logic        spi_miso,
  output logic        step,
  output logic        dir,
  output logic        cfg_start,
  output logic [23:0] cfg_src,
  output logic [23:0] cfg_len,
  output logic        cfg_word_mode,
  output logic        cfg_target,
  input  logic        cfg_busy,
  input  logic        cfg_done
);
  localparam logic [23:0] FLASH_XLX_IMAGE = FLASH_BASE + 24'h08_0000; // 512 KB = 1/3

  logic acc, tripped, tm_d, spi_start, spi_busy, step_start, step_busy;
  logic [7:0]  spi_div;
  logic [15:0] step_per;
  logic [31:0] turns, wr;
  logic [SPI_WORD-1:0] spi_tx, spi_rx;
  logic signed [31:0] step_pos;
  logic [15:0] step_n;
  logic        step_dir;
  logic [3:0]  a;

  assign acc = req.cyc && !rsp.ack;
  assign a   = req.addr[3:0];
  assign wr  = req.wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      dsp_reset <= 1'b1; xlx_reset <= 1'b0; leds <= '0; dsp_flag_o <= '0; dsp_irq <= '0; dsp_dmar <= '0;
      event_trig <= 1'b0; spi_start <= 1'b0; spi_tx <= '0; spi_div <= 8'd3;
      step_start <= 1'b0; step_n <= '0; step_dir <= 1'b0; step_per <= 16'd1000;
      cfg_start <= 1'b0; cfg_src <= FLASH_XLX_IMAGE; cfg_len <= '0;
      cfg_word_mode <= 1'b0; cfg_target <= 1'b0; tripped <= 1'b0; tm_d <= 1'b0; turns <= '0;
      rsp <= '0;
    end else begin
      event_trig <= 1'b0; spi_start <= 1'b0; step_start <= 1'b0; cfg_start <= 1'b0;
      tm_d <= turnmarker;
      if (turnmarker && !tm_d) turns <= turns + 1;
      if (!interlock_ok) tripped <= 1'b1;
      rsp.ack <= acc;
      if (acc && req.we) begin
        unique case (a)
          4'd0:  {leds, xlx_reset, dsp_reset} <= {wr[7:4], wr[1:0]};
          4'd2:  {dsp_dmar, dsp_irq, dsp_flag_o} <= wr[9:0];
          4'd4:  begin event_trig <= 1'b1; if (wr[0] && interlock_ok) tripped <= 1'b0; end
          4'd5:  begin spi_tx <= wr[SPI_WORD-1:0]; spi_start <= 1'b1; end
          4'd7:  spi_div <= wr[7:0];
          4'd8:  begin step_n <= wr[15:0]; step_dir <= wr[16]; step_start <= 1'b1; end
          4'd9:  step_per <= wr[15:0];
          4'd12: cfg_src <= wr[23:0];
          4'd13: cfg_len <= wr[23:0];
          4'd14: begin cfg_start <= wr[0]; cfg_target <= wr[1]; cfg_word_mode <= wr[2]; end
          default: ;
        endcase
      end
      if (acc) begin
        unique case (a)
          4'd0:  rsp.rdata <= {24'h0, leds, 2'b00, xlx_reset, dsp_reset};
          4'd1:  rsp.rdata <= {18'h0, cfg_done, cfg_busy, step_busy, spi_busy, tripped,
                               interlock_ok, dipsw};
          4'd2:  rsp.rdata <= {22'h0, dsp_dmar, dsp_irq, dsp_flag_o};
          4'd3:  rsp.rdata <= {26'h0, dsp_dmag, dsp_flag_i};
          4'd6:  rsp.rdata <= 32'(spi_rx);
          4'd7:  rsp.rdata <= {24'h0, spi_div};
          4'd9:  rsp.rdata <= {16'h0, step_per};
          4'd10: rsp.rdata <= step_pos;
          4'd11: rsp.rdata <= turns;
          4'd12: rsp.rdata <= {8'h0, cfg_src};
          4'd13: rsp.rdata <= {8'h0, cfg_len};
          default: rsp.rdata <= '0;
        endcase
      end
    end
  end

  spi_master #(.WORD(SPI_WORD)) u_spi (.clk, .rst, .start(spi_start), .tx_data(spi_tx),
    .div(spi_div), .rx_data(spi_rx), .busy(spi_busy), .sclk(spi_sclk), .mosi(spi_mosi),
    .cs_n(spi_cs_n), .miso(spi_miso));

  stepper_ctrl u_step (.clk, .rst, .start(step_start), .steps(step_n), .dir_in(step_dir),
    .period(step_per), .step, .dir, .busy(step_busy), .position(step_pos));
endmodule
