// Testbench for pi_ctrl: random errors and gains against a reference PI computed here
// (proportional term with 8 fraction bits, integrator with 16 fraction bits, both
// clamped to the 16-bit output range); also checks that opening the loop clears the
// controller and that saturation is flagged.
module tb_pi_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable = 0, in_valid = 0;
  logic signed [17:0] sp_i = 0, sp_q = 0, kp = 0, ki = 0, in_i = 0, in_q = 0;
  logic out_valid, sat_flag;
  logic signed [15:0] out_i, out_q;

  pi_ctrl #(.W(18), .OW(16), .GW(18), .KPF(8), .KIF(16)) dut (.*);

  localparam longint UMAX = 32767, UMIN = -32768;
  longint integ_i, integ_q;
  int nsat;

  function automatic longint clampl(longint v, longint lo, longint hi);
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  task automatic ref_step(input longint sp, input longint y, inout longint integ,
                          output longint u, output bit s);
    longint e, p, ni;
    e = sp - y;
    p = (longint'(kp) * e) >>> 8;
    ni = integ + longint'(ki) * e;
    s = (ni > (UMAX <<< 16)) || (ni < (UMIN <<< 16));
    ni = clampl(ni, UMIN <<< 16, UMAX <<< 16);
    integ = ni;
    u = p + (ni >>> 16);
    if (u > UMAX || u < UMIN) s = 1;
    u = clampl(u, UMIN, UMAX);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ui, uq;
  bit si, sq;
  initial begin
    integ_i = 0; integ_q = 0; nsat = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0; enable = 1;
    kp = 18'sh00580; ki = 18'sd275;       // 5.5 and 0.1/us at 23.8 MHz updates
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      if (n % 300 == 0 && n > 0) begin
        kp = 18'($urandom_range(0, 4095)); ki = 18'($urandom_range(0, 20000));
      end
      in_valid = 1;
      sp_i = 18'sd20000; sp_q = -18'sd3000;
      in_i = 18'(20000 + $urandom_range(0, 2000) - 1000);
      in_q = 18'(-3000 + $urandom_range(0, 2000) - 1000);
      if (n == 1200) begin kp = 18'sh00100; ki = 18'sd20000; end
      if (n >= 1200 && n < 1300) in_i = -18'sd100000;   // large error: saturation
      ref_step(sp_i, in_i, integ_i, ui, si);
      ref_step(sp_q, in_q, integ_q, uq, sq);
      @(posedge clk); #1;
      checks++;
      if (!(out_valid && out_i == ui && out_q == uq && sat_flag == (si | sq))) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d %0d s%0d want %0d %0d s%0d", n, out_i, out_q, sat_flag, ui, uq, si|sq);
      end
      if (sat_flag) nsat++;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never reached"); end
    // open the loop: output and integrator cleared
    @(negedge clk); enable = 0;
    @(posedge clk); #1;
    checks++;
    if (out_i != 0 || out_q != 0) begin failures++; $display("open loop output not 0"); end
    @(negedge clk); enable = 1; in_i = sp_i; in_q = sp_q; kp = 18'sh00580;
    @(posedge clk); #1;
    checks++;
    if (out_i != 0 || out_q != 0) begin failures++; $display("integrator not cleared: %0d", out_i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
