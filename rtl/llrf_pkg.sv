// Types shared by the fast control loop and the Xilinx-chip register bank: the
// set of loop parameters written by software, and the widths of the data path.
// ADC samples are 14 bits and DAC words 16 bits (the converters of the daughter board);
// 18-bit coefficients match the FPGA's 18 x 18 multipliers. The rest is this design's.
package llrf_pkg;
  localparam int ADC_W = 14;
  localparam int DAC_W = 16;
  localparam int CW    = 18;   // coefficient width
  localparam int FW    = 18;   // field word width inside the loop
  localparam int BUF_AW = 20;  // 1M-word buffers

  typedef struct packed {
    logic signed [CW-1:0]    cal_re0, cal_im0;   // probe A calibration
    logic signed [CW-1:0]    cal_re1, cal_im1;   // probe B calibration
    logic                    vsum_b;             // add probe B (vector sum)
    logic [3:0]              filt_k;             // low-pass shift
    logic                    loop_on;            // closed loop
    logic signed [FW-1:0]    sp_i, sp_q;         // field set point
    logic signed [CW-1:0]    kp, ki;             // PI gains
    logic signed [DAC_W-1:0] drive_i, drive_q;   // open-loop drive offset
    logic                    ff_on;              // add feed-forward LUT
    logic [BUF_AW-2:0]       lut_len;            // LUT pairs, 0 = all
    logic                    dac_playback;       // DACs fed from DAC buffer
  } loop_cfg_t;
endpackage
