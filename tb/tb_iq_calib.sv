// Testbench for iq_calib: random vectors and coefficients; each result is compared with
// the complex product worked out in integer arithmetic here, one cycle later.
module tb_iq_calib;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [14:0] in_i = 0, in_q = 0;
  logic signed [17:0] c_re = 0, c_im = 0;
  logic out_valid;
  logic signed [17:0] out_i, out_q;

  iq_calib #(.IW(15), .CW(18), .CF(16), .OW(18)) dut (.*);

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ei, eq;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_i = 15'($urandom_range(0, 32767)); in_q = 15'($urandom_range(0, 32767));
      c_re = 18'($urandom_range(0, 262143)); c_im = 18'($urandom_range(0, 262143));
      if (n == 0) begin c_re = 18'sh10000; c_im = 0; end          // unity
      if (n == 1) begin c_re = 0; c_im = 18'sh10000; end          // +90 degrees
      ei = sat18((longint'(c_re) * in_i - longint'(c_im) * in_q) >>> 16);
      eq = sat18((longint'(c_re) * in_q + longint'(c_im) * in_i) >>> 16);
      @(posedge clk); #1;
      checks++;
      if (!(out_valid && out_i == ei && out_q == eq)) begin
        failures++;
        $display("n=%0d got %0d %0d want %0d %0d", n, out_i, out_q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
