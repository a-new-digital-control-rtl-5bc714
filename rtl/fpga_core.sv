// Logic of the board's Xilinx chip (Virtex-II): the fast control loop, the four ADC
// sample buffers, the DAC buffer with the feed-forward LUT, and a register bank, all
// reachable from the local bus as a slave.
// Each ADC has its own sample path and buffer; the four buffers share one set of
// capture controls so that the channels are captured together. The fast loop takes
// its two probe channels (ADC 0 and 1) either from the ADCs or, for tests with stored
// data, from the buffers' playback outputs. Buffers and LUT are read and written through
// programmed I/O without stopping the loop.
// Local-bus map inside the chip's window (offset = address bits 22:0):
//   0x000000-0x3FFFFF  ADC buffer n = offset[21:20]   (16-bit data in bits 15:0)
//   0x400000-0x4FFFFF  DAC buffer
//   0x500000-0x5FFFFF  feed-forward LUT
//   0x700000-0x70003F  registers (see the REG_* constants)
// The division into ADC buffers, DAC/LUT buffer and control loop, and PIO access to the
// buffers, follow the board description; the map, the registers and the shared capture
// control are this design's. The chip's own bus-master role is not used.
// Timing: local-bus transfers are acknowledged one cycle after cyc.
module fpga_core
  import lbus_pkg::*;
  import llrf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  lb_req_t                 req,
  output lb_rsp_t                 rsp,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc [4],
  input  logic                    ext_trig,
  input  logic                    event_trig,
  output logic [DAC_W-1:0]        dac_data,
  output logic                    dac_sel,
  output logic                    dac_wr,
  output logic                    pi_sat
);
  localparam int REG_CTRL = 0, REG_CAL_RE0 = 1, REG_CAL_IM0 = 2, REG_CAL_RE1 = 3,
                 REG_CAL_IM1 = 4, REG_SP_I = 5, REG_SP_Q = 6, REG_KP = 7, REG_KI = 8,
                 REG_DRIVE = 9, REG_LUT_LEN = 10, REG_BUF_CTRL = 11, REG_BUF_LEN = 12,
                 REG_PB_LEN = 13, REG_DPB_LEN = 14, REG_CMD = 15, REG_STATUS = 16,
                 REG_WR_PTR = 17, REG_TRIG_PTR = 18, REG_FIELD_I = 19, REG_FIELD_Q = 20,
                 REG_DCAP_PTR = 21;
  // reset values: unity calibration, Kp = 5.5 and Ki = 0.1/us (measured step response)
  localparam logic signed [CW-1:0] KP_DEFAULT = 18'sh00580;
  localparam logic signed [CW-1:0] KI_DEFAULT = 18'sd275;
  localparam logic signed [CW-1:0] CAL_ONE    = 18'sh10000;

  loop_cfg_t cfg;
  logic        adc_pb, dac_cap;
  logic [1:0]  buf_mode;
  logic        trig_sel;
  logic [BUF_AW-1:0] buf_len, pb_len, dpb_len;
  logic [6:0]  cmd;
  logic        sat_sticky;

  // local-bus decode
  logic        acc, ack;
  logic [22:0] off;
  logic [2:0]  rsel_q;
  logic [1:0]  rch_q;
  logic [31:0] reg_rdata;
  assign off = req.addr[22:0];
  assign acc = req.cyc && !ack;

  always_ff @(posedge clk) begin
    if (rst) ack <= 1'b0;
    else     ack <= acc;
    if (acc) begin
      rsel_q <= off[22:20];
      rch_q  <= off[21:20];
    end
  end

  // PIO ports
  logic [15:0] adc_pio_rdata [4];
  logic [15:0] dac_pio_rdata;
  logic signed [ADC_W-1:0] pb_sample [4];
  logic [2:0]  bstate [4];
  logic [BUF_AW-1:0] wptr [4], tptr [4];
  logic [3:0]  btrig;

  // register bank
  logic signed [FW-1:0] field_i, field_q;
  logic field_valid;
  logic [BUF_AW-1:0] dcap_ptr;
  logic dcapturing;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= '{cal_re0: CAL_ONE, cal_im0: '0, cal_re1: CAL_ONE, cal_im1: '0,
               vsum_b: 1'b1, filt_k: 4'd0, loop_on: 1'b0, sp_i: '0, sp_q: '0,
               kp: KP_DEFAULT, ki: KI_DEFAULT, drive_i: '0, drive_q: '0, ff_on: 1'b0,
               lut_len: '0, dac_playback: 1'b0};
      adc_pb   <= 1'b0;
      dac_cap  <= 1'b0;
      buf_mode <= 2'd0;
      trig_sel <= 1'b0;
      buf_len  <= '0;
      pb_len   <= '0;
      dpb_len  <= '0;
      cmd      <= '0;
    end else begin
      cmd <= '0;
      if (acc && req.we && off[22:20] == 3'b111) begin
        unique case (int'(off[5:0]))
          REG_CTRL: begin
            cfg.loop_on      <= req.wdata[0];
            cfg.vsum_b       <= req.wdata[1];
            cfg.ff_on        <= req.wdata[2];
            cfg.dac_playback <= req.wdata[3];
            adc_pb           <= req.wdata[4];
            cfg.filt_k       <= req.wdata[8:5];
            dac_cap          <= req.wdata[9];
          end
          REG_CAL_RE0:  cfg.cal_re0 <= req.wdata[CW-1:0];
          REG_CAL_IM0:  cfg.cal_im0 <= req.wdata[CW-1:0];
          REG_CAL_RE1:  cfg.cal_re1 <= req.wdata[CW-1:0];
          REG_CAL_IM1:  cfg.cal_im1 <= req.wdata[CW-1:0];
          REG_SP_I:     cfg.sp_i    <= req.wdata[FW-1:0];
          REG_SP_Q:     cfg.sp_q    <= req.wdata[FW-1:0];
          REG_KP:       cfg.kp      <= req.wdata[CW-1:0];
          REG_KI:       cfg.ki      <= req.wdata[CW-1:0];
          REG_DRIVE:    {cfg.drive_q, cfg.drive_i} <= req.wdata;
          REG_LUT_LEN:  cfg.lut_len <= req.wdata[BUF_AW-2:0];
          REG_BUF_CTRL: {trig_sel, buf_mode} <= req.wdata[2:0];
          REG_BUF_LEN:  buf_len <= req.wdata[BUF_AW-1:0];
          REG_PB_LEN:   pb_len  <= req.wdata[BUF_AW-1:0];
          REG_DPB_LEN:  dpb_len <= req.wdata[BUF_AW-1:0];
          REG_CMD:      cmd     <= req.wdata[6:0];
          default: ;
        endcase
      end
    end
  end

  logic trig_seen;
  always_ff @(posedge clk) begin
    if (rst || cmd[0]) begin
      sat_sticky <= 1'b0;
      trig_seen  <= 1'b0;
    end else begin
      if (pi_sat)   sat_sticky <= 1'b1;
      if (|btrig)   trig_seen  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (acc) begin
      unique case (int'(off[5:0]))
        REG_CTRL:     reg_rdata <= 32'({dac_cap, cfg.filt_k, adc_pb, cfg.dac_playback,
                                        cfg.ff_on, cfg.vsum_b, cfg.loop_on});
        REG_CAL_RE0:  reg_rdata <= 32'(cfg.cal_re0);
        REG_CAL_IM0:  reg_rdata <= 32'(cfg.cal_im0);
        REG_CAL_RE1:  reg_rdata <= 32'(cfg.cal_re1);
        REG_CAL_IM1:  reg_rdata <= 32'(cfg.cal_im1);
        REG_SP_I:     reg_rdata <= 32'(cfg.sp_i);
        REG_SP_Q:     reg_rdata <= 32'(cfg.sp_q);
        REG_KP:       reg_rdata <= 32'(cfg.kp);
        REG_KI:       reg_rdata <= 32'(cfg.ki);
        REG_DRIVE:    reg_rdata <= {cfg.drive_q, cfg.drive_i};
        REG_LUT_LEN:  reg_rdata <= 32'(cfg.lut_len);
        REG_BUF_CTRL: reg_rdata <= 32'({trig_sel, buf_mode});
        REG_BUF_LEN:  reg_rdata <= 32'(buf_len);
        REG_PB_LEN:   reg_rdata <= 32'(pb_len);
        REG_DPB_LEN:  reg_rdata <= 32'(dpb_len);
        REG_STATUS:   reg_rdata <= 32'({trig_seen, sat_sticky, dcapturing, bstate[0]});
        REG_WR_PTR:   reg_rdata <= 32'(wptr[0]);
        REG_TRIG_PTR: reg_rdata <= 32'(tptr[0]);
        REG_FIELD_I:  reg_rdata <= 32'(field_i);
        REG_FIELD_Q:  reg_rdata <= 32'(field_q);
        REG_DCAP_PTR: reg_rdata <= 32'(dcap_ptr);
        default:      reg_rdata <= '0;
      endcase
    end
  end

  always_comb begin
    rsp.ack = ack;
    unique case (rsel_q)
      3'b000, 3'b001, 3'b010, 3'b011: rsp.rdata = {16'h0, adc_pio_rdata[rch_q]};
      3'b100, 3'b101:                 rsp.rdata = {16'h0, dac_pio_rdata};
      3'b111:                         rsp.rdata = reg_rdata;
      default:                        rsp.rdata = '0;
    endcase
  end

  // ADC buffers
  for (genvar n = 0; n < 4; n++) begin : g_adc
    adc_buffer #(.AW(BUF_AW), .DW(ADC_W)) u_buf (
      .clk, .rst, .sample_valid(adc_valid), .sample(adc[n]),
      .mode(buf_mode), .trig_sel, .ext_trig, .sw_trig(cmd[1]), .arm(cmd[0]), .stop(cmd[2]),
      .length(buf_len), .state_o(bstate[n]), .wr_ptr(wptr[n]), .trig_ptr(tptr[n]),
      .triggered(btrig[n]), .playback(adc_pb), .pb_len, .pb_sample(pb_sample[n]),
      .pio_en(acc && off[22] == 1'b0 && off[21:20] == 2'(n)), .pio_we(req.we),
      .pio_addr(off[19:0]), .pio_wdata(req.wdata[15:0]), .pio_rdata(adc_pio_rdata[n]));
  end

  // Playback output lags the playback switch by one cycle; restart the IQ phase when
  // the first stored word reaches the loop, so that stored word 0 is an I sample.
  logic pb_d1, pb_d2;
  always_ff @(posedge clk) begin
    if (rst) begin pb_d1 <= 1'b0; pb_d2 <= 1'b0; end
    else     begin pb_d1 <= adc_pb; pb_d2 <= pb_d1; end
  end

  // fast loop and DAC/LUT buffer
  logic [BUF_AW-1:0] lut_addr;
  logic [DAC_W-1:0]  lut_rdata, pb_rdata;
  logic              pb_rd;

  fast_loop u_loop (.clk, .rst, .cfg, .phase_rst(cmd[6] || (pb_d1 && !pb_d2)), .sample_valid(adc_valid),
    .probe_a(adc_pb ? pb_sample[0] : adc[0]), .probe_b(adc_pb ? pb_sample[1] : adc[1]),
    .ff_restart(cmd[4] || event_trig), .lut_addr, .lut_rdata, .pb_rd, .pb_rdata,
    .dac_data, .dac_sel, .dac_wr, .field_i, .field_q, .field_valid, .pi_sat);

  dac_buffer #(.AW(BUF_AW), .DW(DAC_W)) u_dbuf (.clk, .rst, .cap_start(cmd[0] && dac_cap),
    .freeze(cmd[3]), .dac_wr, .dac_data, .cap_ptr(dcap_ptr), .capturing(dcapturing),
    .pb_rd, .pb_len(dpb_len), .pb_rdata, .pb_restart(cmd[5]), .lut_addr, .lut_rdata,
    .pio_en(acc && off[22:21] == 2'b10), .pio_we(req.we), .pio_addr(off[20:0]),
    .pio_wdata(req.wdata[15:0]), .pio_rdata(dac_pio_rdata));
endmodule
