// Testbench for iq_lowpass: with k = 0 the input must pass straight through; with
// k > 0 a step input must approach its final value following the first-order recurrence
// (computed here in 64-bit integers) and settle within one unit.
module tb_iq_lowpass;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] shift_k = 0;
  logic in_valid = 0;
  logic signed [17:0] in_i = 0, in_q = 0;
  logic out_valid;
  logic signed [17:0] out_i, out_q;

  iq_lowpass #(.W(18), .FB(12)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ri, rq;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // pass-through
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      in_valid = 1; in_i = 18'($urandom); in_q = 18'($urandom);
      @(posedge clk); #1;
      checks++;
      if (!(out_valid && out_i == in_i && out_q == in_q)) begin
        failures++; $display("k=0 n=%0d got %0d want %0d", n, out_i, in_i);
      end
    end
    // step response, k = 4
    @(negedge clk); in_valid = 0; shift_k = 4;
    ri = longint'(out_i) <<< 12; rq = longint'(out_q) <<< 12;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      in_valid = (n % 2 == 0);     // one update every second cycle
      in_i = 18'sd100000; in_q = -18'sd50000;
      if (in_valid) begin
        ri = ri + (((longint'(in_i) <<< 12) - ri) >>> 4);
        rq = rq + (((longint'(in_q) <<< 12) - rq) >>> 4);
      end
      @(posedge clk); #1;
      checks++;
      if (out_i != (ri >>> 12) || out_q != (rq >>> 12)) begin
        failures++; $display("step n=%0d got %0d %0d want %0d %0d", n, out_i, out_q, ri >>> 12, rq >>> 12);
      end
    end
    checks++;
    if (out_i < 99999 || out_i > 100000 || out_q < -50001 || out_q > -49999) begin
      failures++; $display("did not settle: %0d %0d", out_i, out_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
