// Testbench for iq_demod: feeds an IF signal sampled four times per period, with a new
// random field vector for every period, and checks that each (I, Q) pair comes out one
// cycle after its Q sample, with the sign of the second half-period undone.
module tb_iq_demod;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic phase_rst = 0, in_valid = 0;
  logic signed [13:0] in_data = 0;
  logic out_valid;
  logic signed [14:0] out_i, out_q;

  iq_demod #(.DW(14)) dut (.*);

  logic signed [13:0] vi, vq;
  int pairs = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic signed [13:0] s, input logic pr);
    @(negedge clk); in_valid = 1; in_data = s; phase_rst = pr;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int p = 0; p < 200; p++) begin
      vi = 14'($urandom_range(0, 16382) - 8191);
      vq = 14'($urandom_range(0, 16382) - 8191);
      if (p == 0) begin vi = -14'sd8191; vq = 14'sd8191; end
      send(vi, p == 0);      // I
      send(vq, 0);           // Q
      @(posedge clk); #1;
      checks++;
      if (!(out_valid && out_i == vi && out_q == vq)) begin
        failures++; $display("pair %0d first half: got v=%0d %0d %0d want %0d %0d", p, out_valid, out_i, out_q, vi, vq);
      end
      send(-vi, 0);          // -I
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("valid after I sample"); end
      send(-vq, 0);          // -Q
      @(posedge clk); #1;
      checks++;
      if (!(out_valid && out_i == vi && out_q == vq)) begin
        failures++; $display("pair %0d second half: got %0d %0d want %0d %0d", p, out_i, out_q, vi, vq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
