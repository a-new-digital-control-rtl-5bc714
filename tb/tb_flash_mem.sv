// Testbench for flash_mem (1536-byte instance): random byte writes through the local-bus
// port (upper data bits must be ignored), then reads compared with a copy kept here
// (upper bits zero), plus reads past the end returning 0; every transfer must be
// acknowledged one cycle after cyc for one cycle.
module tb_flash_mem;
  import lbus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  lb_req_t req = LB_IDLE;
  lb_rsp_t rsp;
  flash_mem #(.DEPTH(1536)) dut (.*);

  logic [31:0] shadow [1536];
  logic [1535:0] written = '0;

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
      a = $urandom_range(0, 1535);
      shadow[a] = {24'h0, 8'($urandom)}; written[a] = 1;
      xfer(1, 24'(a), {24'($urandom), shadow[a][7:0]}, d);
    end
    for (int n = 0; n < 1536; n++) if (written[n]) begin
      xfer(0, 24'(n), 32'h0, d);
      checks++; if (d != shadow[n]) begin failures++; $display("addr %0d got %h want %h", n, d, shadow[n]); end
    end
    for (int n = 1536; n < 1600; n += 7) begin
      xfer(0, 24'(n), 32'h0, d);
      checks++; if (d != 0) begin failures++; $display("out of range read %h", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
