// Testbench for vector_sum: random vectors, with and without the second probe, and
// with sums that saturate; results checked one cycle later.
module tb_vector_sum;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_valid = 0, b_enable = 0;
  logic signed [17:0] a_i = 0, a_q = 0, b_i = 0, b_q = 0;
  logic out_valid;
  logic signed [17:0] out_i, out_q;

  vector_sum #(.W(18)) dut (.*);

  function automatic int sat(int v);
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

  int ei, eq, nsat;
  initial begin
    nsat = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a_valid = 1; b_enable = n[0];
      a_i = 18'($urandom); a_q = 18'($urandom); b_i = 18'($urandom); b_q = 18'($urandom);
      ei = sat(int'(a_i) + (b_enable ? int'(b_i) : 0));
      eq = sat(int'(a_q) + (b_enable ? int'(b_q) : 0));
      if (ei == 131071 || ei == -131072) nsat++;
      @(posedge clk); #1;
      checks++;
      if (!(out_valid && out_i == ei && out_q == eq)) begin
        failures++; $display("n=%0d got %0d %0d want %0d %0d", n, out_i, out_q, ei, eq);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("no saturating case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
