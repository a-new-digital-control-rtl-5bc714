// Fast RF field controller: the loop that runs in the Xilinx chip.
// The probe signals of two cavities are demodulated into I and Q (two successive
// samples of the 4x-oversampled IF), calibrated by a complex gain, summed as vectors,
// low-pass filtered and compared with the set point by a PI controller; the result,
// plus an open-loop drive and a feed-forward constant from the LUT, goes to the two
// DACs over their shared bus. The chain of stages follows the board description; the
// details of each stage are this design's (see the stage modules).
// Timing: one sample per cycle (clk is the 4x IF sample clock, 47.6 MHz). A new IQ pair
// enters the controller every second cycle. From the Q sample to the I word on the DAC
// bus takes 8 cycles (the Q word follows one cycle later): about 0.2 us, well inside
// the loop latency budget of 1 us.
module fast_loop
  import llrf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  loop_cfg_t               cfg,
  input  logic                    phase_rst,
  input  logic                    sample_valid,
  input  logic signed [ADC_W-1:0] probe_a,
  input  logic signed [ADC_W-1:0] probe_b,
  input  logic                    ff_restart,
  // LUT and DAC-buffer playback ports
  output logic [BUF_AW-1:0]       lut_addr,
  input  logic [DAC_W-1:0]        lut_rdata,
  output logic                    pb_rd,
  input  logic [DAC_W-1:0]        pb_rdata,
  // shared DAC bus
  output logic [DAC_W-1:0]        dac_data,
  output logic                    dac_sel,
  output logic                    dac_wr,
  // monitoring
  output logic signed [FW-1:0]    field_i,
  output logic signed [FW-1:0]    field_q,
  output logic                    field_valid,
  output logic                    pi_sat
);
  logic                   dv_a, dv_b, cv_a, cv_b, sv, pv;
  logic signed [ADC_W:0]  ai, aq, bi, bq;
  logic signed [FW-1:0]   cai, caq, cbi, cbq, si, sq;
  logic signed [DAC_W-1:0] ui, uq;

  iq_demod #(.DW(ADC_W)) u_dem_a (.clk, .rst, .phase_rst, .in_valid(sample_valid),
    .in_data(probe_a), .out_valid(dv_a), .out_i(ai), .out_q(aq));
  iq_demod #(.DW(ADC_W)) u_dem_b (.clk, .rst, .phase_rst, .in_valid(sample_valid),
    .in_data(probe_b), .out_valid(dv_b), .out_i(bi), .out_q(bq));

  iq_calib #(.IW(ADC_W+1), .CW(CW), .CF(16), .OW(FW)) u_cal_a (.clk, .rst,
    .in_valid(dv_a), .in_i(ai), .in_q(aq), .c_re(cfg.cal_re0), .c_im(cfg.cal_im0),
    .out_valid(cv_a), .out_i(cai), .out_q(caq));
  iq_calib #(.IW(ADC_W+1), .CW(CW), .CF(16), .OW(FW)) u_cal_b (.clk, .rst,
    .in_valid(dv_b), .in_i(bi), .in_q(bq), .c_re(cfg.cal_re1), .c_im(cfg.cal_im1),
    .out_valid(cv_b), .out_i(cbi), .out_q(cbq));

  vector_sum #(.W(FW)) u_vsum (.clk, .rst, .a_valid(cv_a), .a_i(cai), .a_q(caq),
    .b_i(cbi), .b_q(cbq), .b_enable(cfg.vsum_b), .out_valid(sv), .out_i(si), .out_q(sq));

  iq_lowpass #(.W(FW)) u_filt (.clk, .rst, .shift_k(cfg.filt_k), .in_valid(sv),
    .in_i(si), .in_q(sq), .out_valid(field_valid), .out_i(field_i), .out_q(field_q));

  pi_ctrl #(.W(FW), .OW(DAC_W), .GW(CW)) u_pi (.clk, .rst, .enable(cfg.loop_on),
    .sp_i(cfg.sp_i), .sp_q(cfg.sp_q), .kp(cfg.kp), .ki(cfg.ki), .in_valid(field_valid),
    .in_i(field_i), .in_q(field_q), .out_valid(pv), .out_i(ui), .out_q(uq), .sat_flag(pi_sat));

  dac_out #(.W(DAC_W), .LW(BUF_AW)) u_out (.clk, .rst, .in_valid(pv), .in_i(ui), .in_q(uq),
    .drive_i(cfg.drive_i), .drive_q(cfg.drive_q), .ff_enable(cfg.ff_on),
    .ff_restart(ff_restart), .lut_len(cfg.lut_len), .playback(cfg.dac_playback),
    .lut_addr, .lut_rdata, .pb_rd, .pb_rdata, .dac_data, .dac_sel, .dac_wr);

  // both probe channels run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (rst) dv_a == dv_b);
  a_lockstep_cal: assert property (@(posedge clk) disable iff (rst) cv_a == cv_b);
endmodule
