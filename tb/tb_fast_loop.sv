// Testbench for fast_loop. Part 1 measures the loop latency: with Kp = 1 and no
// integral gain, a step in the probe field must show up as I = -step on the DAC bus
// exactly 8 clock cycles after the Q sample (0.17 us at 47.6 MHz, below the 1 us
// budget). Part 2 closes the loop around a cavity model written here: a first-order
// low-pass (bandwidth much wider than a superconducting cavity's, like the copper test
// cavity) with a gain and a 20 degree phase shift, whose field is split between the two
// probe channels and sampled as a 4x IF signal. With vector sum on, the PI loop must
// settle the summed field to the set point, and the DAC words must come in I/Q pairs.
module tb_fast_loop;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  loop_cfg_t cfg;
  logic phase_rst = 0, sample_valid = 0, ff_restart = 0;
  logic signed [13:0] probe_a = 0, probe_b = 0;
  logic [19:0] lut_addr;
  logic [15:0] lut_rdata = 0, pb_rdata = 0, dac_data;
  logic pb_rd, dac_sel, dac_wr, field_valid, pi_sat;
  logic signed [17:0] field_i, field_q;

  fast_loop dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;               // clock edges so far
  always @(posedge clk) cyc++;

  // DAC bus capture
  real drive_i = 0, drive_q = 0;
  int last_i_word_cyc = -1,  // first I word showing the step
       pairs = 0, bad_order = 0;
  logic last_sel = 1;
  always @(negedge clk) if (dac_wr) begin
    if (dac_sel == last_sel) bad_order++;
    last_sel = dac_sel;
    if (!dac_sel) begin
      drive_i = real'($signed(dac_data));
      if (last_i_word_cyc < 0 && $signed(dac_data) == -16'sd1000) last_i_word_cyc = cyc;
    end
    else begin drive_q = real'($signed(dac_data)); pairs++; end
  end

  // cavity model
  real fi = 0, fq = 0, ti, tq;
  bit model_on = 0;
  real g = 0.5, c = 0.9397, s = 0.3420, alpha = 0.02;
  int k = 0;
  function automatic logic signed [13:0] adc(real v);
    if (v > 8191.0) return 14'sd8191;
    if (v < -8192.0) return -14'sd8192;
    return 14'($rtoi(v >= 0 ? v + 0.5 : v - 0.5));
  endfunction
  always @(negedge clk) if (model_on) begin
    ti = g * (c * drive_i - s * drive_q);
    tq = g * (s * drive_i + c * drive_q);
    fi = fi + alpha * (ti - fi);
    fq = fq + alpha * (tq - fq);
    case (k % 4)
      0: begin probe_a = adc(0.6 * fi);  probe_b = adc(0.4 * fi);  end
      1: begin probe_a = adc(0.6 * fq);  probe_b = adc(0.4 * fq);  end
      2: begin probe_a = adc(-0.6 * fi); probe_b = adc(-0.4 * fi); end
      default: begin probe_a = adc(-0.6 * fq); probe_b = adc(-0.4 * fq); end
    endcase
    k++;
  end

  int tq_cyc;
  initial begin
    cfg = '{cal_re0: 18'sh10000, cal_im0: 0, cal_re1: 18'sh10000, cal_im1: 0, vsum_b: 0,
            filt_k: 0, loop_on: 1, sp_i: 0, sp_q: 0, kp: 18'sh00100, ki: 0, drive_i: 0,
            drive_q: 0, ff_on: 0, lut_len: 0, dac_playback: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0; sample_valid = 1; phase_rst = 1; probe_a = 0;
    @(negedge clk) phase_rst = 0;           // sample 1 = Q
    for (int n = 0; n < 11; n++) @(negedge clk);  // zeros up to sample 11 (phase 3)
    // the value set now is sample 12, phase 0 (I)
    probe_a = 14'sd1000;                     // I
    @(negedge clk) probe_a = -14'sd500;      // Q
    tq_cyc = cyc;                            // the next edge (tq_cyc + 1) samples Q
    @(negedge clk) probe_a = -14'sd1000;     // -I
    @(negedge clk) probe_a = 14'sd500;       // -Q
    @(negedge clk) probe_a = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (last_i_word_cyc - tq_cyc != 8) begin failures++; $display("latency %0d cycles, want 8", last_i_word_cyc - tq_cyc); end
    else $display("loop latency: %0d cycles = %0d ns at 47.6 MHz", last_i_word_cyc - tq_cyc, (last_i_word_cyc - tq_cyc) * 21);
    // step result: I = Kp*(0 - 1000) = -1000, Q = +500
    repeat (20) @(negedge clk);
    checks++;
    if (!(bad_order == 0 && pairs > 10)) begin failures++; $display("DAC word order broken"); end
    // part 2: closed loop with the cavity model and vector sum
    @(negedge clk);
    cfg.vsum_b = 1; cfg.filt_k = 1; cfg.sp_i = 18'sd6000; cfg.sp_q = 18'sd2000;
    cfg.kp = 18'sh00100; cfg.ki = 18'sd3000;
    drive_i = 0; drive_q = 0; k = 0; model_on = 1; phase_rst = 1;
    @(negedge clk) phase_rst = 0;
    repeat (20000) @(negedge clk);
    checks++;
    if (field_i < 5940 || field_i > 6060 || field_q < 1980 || field_q > 2020) begin
      failures++; $display("field not at set point: %0d %0d", field_i, field_q);
    end else $display("settled field %0d %0d (set point 6000 2000)", field_i, field_q);
    checks++;
    if (fi * fi + fq * fq < 6000.0 * 6000.0) begin failures++; $display("model field too small"); end
    checks++;
    if (bad_order != 0) begin failures++; $display("DAC words out of order"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
