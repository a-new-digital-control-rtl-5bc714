// End-to-end testbench for rf_board_top at its full size. A VME master model and a DSP
// bus-master model here drive the board, and a DSP slave model answers the DSP window; a cavity model closes the RF loop between the
// DAC bus and the ADC inputs (first-order response, gain 0.5, 20 degree phase shift,
// field split 60/40 between the two probe channels, sampled as a 4x IF signal).
// Sequence: VME and DSP write and read the static RAM at the same time (arbitration);
// VME reads and writes the DSP's memory through the board;
// a configuration image is written into FLASH and into static RAM over VME and streamed
// out by the configuration controller from each; CSR functions (SPI loop-back, stepper
// move, event trigger, turnmarker); then the RF loop: open-loop drive, switch to closed
// loop and settle on the set point, a set-point jump that saturates the controller, a
// capture of the ADC data at an external trigger and of the DAC stream, read back over
// VME, feed-forward from the LUT, playback of stored IF data, and holding the Xilinx
// logic in reset. Each of these mechanisms is counted and must occur.
module tb_rf_board_top;
  import lbus_pkg::*;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] vme_base = 6'h05;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_write_n = 1;
  logic [5:0] vme_am = 6'h09;
  logic [31:2] vme_addr = 0;
  logic [31:0] vme_data_i = 0, vme_data_o;
  logic vme_data_oe, vme_dtack_n;
  lb_req_t dsp_req = LB_IDLE;
  lb_rsp_t dsp_rsp;
  lb_req_t dsp_s_req;
  lb_rsp_t dsp_s_rsp = '0;
  logic dsp_reset;
  logic [3:0] dsp_flag_o, dsp_irq, leds;
  logic [3:0] dsp_flag_i = 4'h3;
  logic [1:0] dsp_dmar, dsp_dmag = 2'b01;
  logic adc_valid = 0;
  logic signed [ADC_W-1:0] adc [4];
  logic [DAC_W-1:0] dac_data;
  logic dac_sel, dac_wr;
  logic ext_trig = 0, interlock_ok = 1, turnmarker = 0;
  logic [7:0] dipsw = 8'h3C;
  logic spi_sclk, spi_mosi, spi_cs_n, spi_miso, step, dir;
  logic [7:0] cfg_data;
  logic cfg_wr, cfg_target, cfg_done, pi_sat;
  assign spi_miso = spi_mosi;

  rf_board_top dut (.*);

  // ---------------------------------------------------------------- helpers
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam logic [23:0] CSR = 24'h400000, XREG = 24'hF00000, ADCB = 24'h800000,
                          DACB = 24'hC00000, LUT = 24'hD00000, FLASH = 24'h200000;

  // VME single D32 cycle to local word address a
  task automatic vme(input bit wr, input logic [23:0] a, input logic [31:0] wd, output logic [31:0] rd);
    bit acked;
    acked = 0;
    #3 vme_addr = {vme_base, a, 2'b00} >> 2; vme_am = 6'h09; vme_write_n = !wr; vme_data_i = wd;
    vme_addr[31:26] = vme_base;
    #7 vme_as_n = 0;
    #5 vme_ds0_n = 0;
    for (int i = 0; i < 200 && !acked; i++) begin
      @(posedge clk);
      if (!vme_dtack_n) acked = 1;
    end
    #2 rd = vme_data_o;
    vme_ds0_n = 1; vme_as_n = 1;
    check(acked, $sformatf("VME DTACK for %h", a));
    repeat (3) @(posedge clk);
  endtask
  task automatic vw(input logic [23:0] a, input logic [31:0] d);
    logic [31:0] x; vme(1, a, d, x);
  endtask
  task automatic vr(input logic [23:0] a, output logic [31:0] d);
    vme(0, a, 0, d);
  endtask

  task automatic dsp(input bit we, input logic [23:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk) dsp_req = '{cyc: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk); while (!dsp_rsp.ack);
    rd = dsp_rsp.rdata;
    #1 dsp_req.cyc = 0;
  endtask

  // DSP as a slave: its memory, answering one cycle after cyc with a one-cycle ack
  logic [31:0] dsp_mem [int];
  int n_dsp_slave = 0;
  always @(posedge clk) begin
    dsp_s_rsp.ack <= dsp_s_req.cyc && !dsp_s_rsp.ack;
    if (dsp_s_req.cyc && !dsp_s_rsp.ack) begin
      n_dsp_slave++;
      if (dsp_s_req.we) dsp_mem[int'(dsp_s_req.addr)] = dsp_s_req.wdata;
      dsp_s_rsp.rdata <= dsp_mem.exists(int'(dsp_s_req.addr)) ? dsp_mem[int'(dsp_s_req.addr)] : 32'h0;
    end
  end

  // ---------------------------------------------------------------- mechanisms
  int n_arb_conflict = 0, n_cfg_flash = 0, n_cfg_sram = 0, n_spi = 0, n_step = 0,
      n_event = 0, n_turn = 0, n_open_loop = 0, n_mode_switch = 0, n_settled = 0,
      n_sat = 0, n_ext_capture = 0, n_dac_capture = 0, n_ff = 0, n_playback = 0,
      n_xlx_reset = 0;
  always @(posedge clk) if (dut.m_req[1].cyc && dut.m_req[2].cyc) n_arb_conflict++;
  always @(posedge clk) if (pi_sat) n_sat++;

  // ---------------------------------------------------------------- cavity model
  real drive_i = 0, drive_q = 0, fi = 0, fq = 0, ti, tq;
  real g = 0.5, c = 0.9397, s = 0.3420, alpha = 0.02;
  int k = 0, n_dac_words = 0;
  always @(negedge clk) if (dac_wr) begin
    n_dac_words++;
    if (!dac_sel) drive_i = real'($signed(dac_data)); else drive_q = real'($signed(dac_data));
  end
  function automatic logic signed [13:0] to_adc(real v);
    if (v > 8191.0) return 14'sd8191;
    if (v < -8192.0) return -14'sd8192;
    return 14'($rtoi(v >= 0 ? v + 0.5 : v - 0.5));
  endfunction
  // The model's IF sample phase counts clock edges since reset, like the demodulator's.
  always @(posedge clk) if (rst) k <= 0; else k <= k + 1;
  always @(negedge clk) begin
    real pi_, pq_;
    ti = g * (c * drive_i - s * drive_q);
    tq = g * (s * drive_i + c * drive_q);
    fi = fi + alpha * (ti - fi);
    fq = fq + alpha * (tq - fq);
    pi_ = (k % 4 < 2) ? fi : -fi;
    pq_ = (k % 4 < 2) ? fq : -fq;
    adc[0] = to_adc(0.6 * ((k % 2 == 0) ? pi_ : pq_));
    adc[1] = to_adc(0.4 * ((k % 2 == 0) ? pi_ : pq_));
    adc[2] = to_adc(0.1 * drive_i);           // klystron output monitor
    adc[3] = 14'(k);                          // drive monitor: a counter, easy to check
  end

  // configuration stream
  logic [7:0] cfg_got [$];
  always @(posedge clk) if (cfg_wr) cfg_got.push_back(cfg_data);

  // SPI and stepper observation
  always @(negedge spi_cs_n) n_spi++;
  always @(posedge step) n_step++;

  // ---------------------------------------------------------------- sequence
  logic [31:0] d, d0;
  logic [31:0] img [8];
  int cap_len;
  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0; adc_valid = 1;

    // 1) VME and DSP on the static RAM at the same time
    fork
      for (int i = 0; i < 20; i++) vw(24'(i), 32'hA000_0000 + 32'(i));
      for (int i = 0; i < 40; i++) dsp(1, 24'(100 + i), 32'hD000_0000 + 32'(i), d0);
    join
    for (int i = 0; i < 20; i += 3) begin vr(24'(i), d); check(d == 32'hA000_0000 + 32'(i), "SRAM via VME"); end
    for (int i = 0; i < 40; i += 7) begin logic [31:0] x; dsp(0, 24'(100 + i), 0, x); check(x == 32'hD000_0000 + 32'(i), "SRAM via DSP"); end
    vr(24'(105), d); check(d == 32'hD000_0005, "DSP data seen from VME");
    vw(24'h600123, 32'h0D5F_0123); vr(24'h600123, d);
    check(d == 32'h0D5F_0123 && dsp_mem[32'h600123] == 32'h0D5F_0123, "DSP memory as a slave via VME");
    vr(24'h700000, d); check(d == 0, "unmapped address reads 0");

    // 2) configuration from FLASH (Xilinx image at the default source) and static RAM
    for (int i = 0; i < 8; i++) img[i] = $urandom;
    for (int i = 0; i < 12; i++) vw(24'h280000 + 24'(i), {24'hFFFFFF, img[i / 4][8 * (i % 4) +: 8]});
    vr(CSR + 1, d); check(d[7:0] == 8'h3C, "dipswitch");
    vw(CSR + 13, 12);
    cfg_got.delete();
    vw(CSR + 14, 32'h1);                       // start, Xilinx, byte mode, default source
    repeat (120) @(negedge clk);
    check(cfg_done && cfg_got.size() == 12 && !cfg_target, "FLASH configuration length");
    for (int i = 0; i < 12; i++) check(cfg_got[i] == img[i / 4][8 * (i % 4) +: 8], "FLASH configuration byte");
    if (cfg_done && cfg_got.size() == 12) n_cfg_flash++;
    for (int i = 0; i < 8; i++) vw(24'h1000 + 24'(i), img[i]);
    vw(CSR + 12, 24'h1000); vw(CSR + 13, 32);
    cfg_got.delete();
    vw(CSR + 14, 32'h7);                       // start, DSP, word mode
    repeat (300) @(negedge clk);
    check(cfg_done && cfg_got.size() == 32 && cfg_target, "SRAM configuration length");
    for (int i = 0; i < 32; i++) check(cfg_got[i] == img[i / 4][8 * (3 - i % 4) +: 8], "SRAM configuration byte");
    if (cfg_done && cfg_got.size() == 32) n_cfg_sram++;

    // 3) CSR: resets, SPI, stepper, event, turnmarker
    check(dsp_reset, "DSP held in reset after power-up");
    vw(CSR + 0, 32'h50);                       // release DSP, LEDs
    check(!dsp_reset && leds == 4'h5, "CSR control lines");
    dsp(1, CSR + 2, 32'h1A5, d);                 // DSP sets its own flag, interrupt and DMA lines
    check(dsp_flag_o == 4'h5 && dsp_irq == 4'hA && dsp_dmar == 2'b01, "DSP peripheral lines");
    dsp(0, CSR + 3, 0, d); check(d == 32'h13, "DSP flag and DMA grant inputs");
    vw(CSR + 5, 32'h123456);
    repeat (250) @(negedge clk);
    vr(CSR + 6, d); check(d == 32'h123456, "SPI loop-back through CSR");
    vw(CSR + 9, 8); vw(CSR + 8, 32'd5);
    repeat (80) @(negedge clk);
    vr(CSR + 10, d); check(d == 5 && n_step == 5, "stepper moved 5 steps");
    repeat (3) begin @(negedge clk) turnmarker = 1; repeat (4) @(negedge clk); turnmarker = 0; end
    vr(CSR + 11, d); check(d == 3, "turnmarker count"); if (d == 3) n_turn++;

    // 4) RF loop: open-loop drive
    vw(XREG + 0, 32'h2);                       // loop off, vector sum on
    vw(XREG + 9, {16'd0, 16'd4000});
    repeat (3000) @(negedge clk);
    check(drive_i == 4000.0 && drive_q == 0.0, "open-loop drive on DAC bus");
    check(fi > 1800 && fi < 1900, $sformatf("cavity field follows open-loop drive (%0.1f)", fi));
    n_open_loop++;
    // switch to closed loop: Kp = 1, Ki = 3000/65536 per update, set point (6000, 2000)
    vw(XREG + 9, 0);
    vw(XREG + 7, 32'h100); vw(XREG + 8, 3000);
    vw(XREG + 5, 6000); vw(XREG + 6, 2000);
    vw(XREG + 0, 32'h23);                      // loop on, vector sum, filter k = 1
    n_mode_switch++;
    repeat (20000) @(negedge clk);
    vr(XREG + 19, d); d0 = d;
    vr(XREG + 20, d);
    check($signed(d0[17:0]) > 5940 && $signed(d0[17:0]) < 6060 && $signed(d[17:0]) > 1980 && $signed(d[17:0]) < 2020,
          $sformatf("closed loop settles at set point: %0d %0d", $signed(d0[17:0]), $signed(d[17:0])));
    if ($signed(d0[17:0]) > 5940 && $signed(d0[17:0]) < 6060) n_settled++;
    // set-point jump beyond reach: the controller saturates
    vw(XREG + 5, 60000);
    repeat (200) @(negedge clk);
    vr(XREG + 16, d); check(d[4], "saturation flagged");
    vw(XREG + 5, 6000);
    repeat (15000) @(negedge clk);

    // 5) capture at an external trigger: store continuously, wait 100 samples after it
    cap_len = 100;
    vw(XREG + 11, 32'h2);                      // mode DELAY, external trigger
    vw(XREG + 12, cap_len);
    vw(XREG + 0, 32'h223);                     // plus DAC capture
    vw(XREG + 15, 32'h1);                      // arm (ADC buffers and DAC buffer)
    repeat (500) @(negedge clk);
    @(negedge clk) ext_trig = 1;
    repeat (5) @(negedge clk); ext_trig = 0;
    repeat (200) @(negedge clk);
    vr(XREG + 16, d); check(d[2:0] == 3'd4 && d[5], "capture stopped after the external trigger");
    vr(XREG + 18, d0);
    vr(XREG + 17, d); check(d == d0 + 32'(cap_len) + 1, "samples stored after trigger");
    begin
      logic [31:0] w0, w;
      vr(ADCB + 24'h300000 + 24'(d0), w0);
      for (int i = -50; i <= cap_len; i += 25) begin
        vr(ADCB + 24'h300000 + 24'(d0 + i), w);
        check(w[13:0] == 14'(w0 + i), "captured drive-monitor samples consecutive");
      end
      if (d == d0 + 32'(cap_len) + 1) n_ext_capture++;
    end
    vw(XREG + 15, 32'h8);                      // freeze DAC buffer
    vr(XREG + 21, d); check(d > 300, "DAC stream captured");
    vr(DACB + 24'(d - 2), d0);
    check(d0[15:0] != 0, "DAC buffer holds drive words");
    if (d > 300) n_dac_capture++;

    // 6) feed-forward from the LUT, restarted by an event trigger from the CSR
    vw(XREG + 0, 32'h0);                       // loop off
    for (int i = 0; i < 4; i++) vw(LUT + 24'(i), 32'(i * 1000));
    vw(XREG + 10, 2);
    vw(XREG + 0, 32'h4);                       // feed-forward on
    vw(CSR + 4, 0); n_event++;
    begin
      int hits;
      hits = 0;
      repeat (40) begin
        @(negedge clk);
        if (dac_wr && !dac_sel && ($signed(dac_data) == 2000)) hits++;
      end
      check(hits > 0, "feed-forward value on the DAC bus");
      if (hits > 0) n_ff++;
    end

    // 7) playback of stored IF data through the loop
    vw(ADCB + 0, 3000); vw(ADCB + 1, 500); vw(ADCB + 2, 32'(-3000) & 32'hFFFF); vw(ADCB + 3, 32'(-500) & 32'hFFFF);
    vw(XREG + 13, 4);
    vw(XREG + 0, 32'h10);                      // playback, probe B off, loop off
    repeat (40) @(negedge clk);
    vr(XREG + 19, d); vr(XREG + 20, d0);
    check($signed(d[17:0]) == 3000 && $signed(d0[17:0]) == 500, "field from stored data");
    if ($signed(d[17:0]) == 3000) n_playback++;

    // 8) Xilinx logic held in reset by the CSR
    vw(CSR + 0, 32'h2);
    begin
      int w0;
      w0 = n_dac_words;
      repeat (50) @(negedge clk);
      check(n_dac_words == w0, "no DAC words while the Xilinx logic is in reset");
      if (n_dac_words == w0) n_xlx_reset++;
    end
    vw(CSR + 0, 32'h0);
    vr(XREG + 7, d); check(d == 32'h580, "Xilinx registers back at reset values");

    // mechanisms
    $display("DSP slave accesses %0d", n_dsp_slave);
    $display("arbitration conflicts %0d, config FLASH %0d, config SRAM %0d, SPI %0d, steps %0d, events %0d, turns %0d",
             n_arb_conflict, n_cfg_flash, n_cfg_sram, n_spi, n_step, n_event, n_turn);
    $display("open loop %0d, mode switch %0d, settled %0d, saturated cycles %0d, ext capture %0d, DAC capture %0d, ff %0d, playback %0d, Xilinx reset %0d",
             n_open_loop, n_mode_switch, n_settled, n_sat, n_ext_capture, n_dac_capture, n_ff, n_playback, n_xlx_reset);
    check(n_arb_conflict > 0, "arbitration conflict happened");
    check(n_dsp_slave > 0, "DSP slave access happened");
    check(n_cfg_flash > 0, "configuration from FLASH happened");
    check(n_cfg_sram > 0, "configuration from static RAM happened");
    check(n_spi > 0 && n_step > 0 && n_event > 0 && n_turn > 0, "CSR mechanisms happened");
    check(n_open_loop > 0 && n_mode_switch > 0 && n_settled > 0, "loop modes happened");
    check(n_sat > 0, "saturation happened");
    check(n_ext_capture > 0 && n_dac_capture > 0, "captures happened");
    check(n_ff > 0 && n_playback > 0 && n_xlx_reset > 0, "feed-forward, playback and reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
