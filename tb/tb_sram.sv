// Testbench for sram (1K-word instance): random writes through the local-bus port, then
// reads compared with a copy kept here; every transfer must be acknowledged exactly one
// cycle after cyc and the ack must last one cycle.
module tb_sram;
  import lbus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  lb_req_t req = LB_IDLE;
  lb_rsp_t rsp;
  sram #(.AW(10)) dut (.*);

  logic [31:0] shadow [1024];
  logic [1023:0] written = '0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input bit we, input logic [23:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk) req = '{cyc: 1'b1, we: we, addr: a, wdata: wd};
    @(negedge clk);
    checks++; if (!rsp.ack) begin failures++; $display("no ack after one cycle"); end
    rd = rsp.rdata;
    req.cyc = 1'b0;
    @(negedge clk);
    checks++; if (rsp.ack) begin failures++; $display("ack longer than one cycle"); end
  endtask

  logic [31:0] d;
  int a;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 300; n++) begin
      a = $urandom_range(0, 1023);
      shadow[a] = $urandom; written[a] = 1;
      xfer(1, 24'(a), shadow[a], d);
    end
    for (int n = 0; n < 1024; n++) if (written[n]) begin
      xfer(0, 24'(n), 32'h0, d);
      checks++; if (d != shadow[n]) begin failures++; $display("addr %0d got %h want %h", n, d, shadow[n]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
