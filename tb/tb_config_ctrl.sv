// Testbench for config_ctrl: a local-bus memory model here holds an image; the
// controller must stream it out byte by byte, from byte-wide FLASH words (bits 7:0) and
// from 32-bit static-RAM words (most significant byte first), stop after exactly len
// bytes, raise done and keep the target it was started with.
module tb_config_ctrl;
  import lbus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, word_mode = 0, target_in = 0;
  logic [23:0] src_addr = 0, len = 0;
  lb_req_t m_req;
  lb_rsp_t m_rsp;
  logic [7:0] cfg_data;
  logic cfg_wr, cfg_target, busy, done;

  config_ctrl dut (.*);

  // memory: word at address a holds a pattern
  function automatic logic [31:0] memword(logic [23:0] a);
    return {a[7:0] ^ 8'h5a, a[15:8], a[7:0] + 8'd1, a[7:0] * 8'd3};
  endfunction
  initial begin
    m_rsp = '0;
    forever begin
      @(posedge clk);
      if (m_req.cyc && !m_rsp.ack) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 m_rsp = '{ack: 1'b1, rdata: memword(m_req.addr)};
        @(posedge clk) #1 m_rsp.ack = 0;
      end
    end
  end

  logic [7:0] got [$];
  always @(posedge clk) if (cfg_wr) got.push_back(cfg_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [23:0] a, input int n, input bit wm, input bit tgt);
    got.delete();
    @(negedge clk) src_addr = a; len = 24'(n); word_mode = wm; target_in = tgt; start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (3) @(negedge clk);
    checks++; if (got.size() != n) begin failures++; $display("%0d bytes want %0d", got.size(), n); end
    for (int i = 0; i < n && i < got.size(); i++) begin
      logic [31:0] w;
      logic [7:0] e;
      w = memword(a + 24'(wm ? i / 4 : i));
      e = wm ? w[8 * (3 - i % 4) +: 8] : w[7:0];
      checks++; if (got[i] != e) begin failures++; if (failures < 10) $display("byte %0d got %h want %h", i, got[i], e); end
    end
    checks++; if (cfg_target != tgt || busy) begin failures++; $display("target/busy wrong"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(24'h280000, 37, 0, 0);     // Xilinx image from FLASH
    run(24'h000100, 30, 1, 0);     // from static RAM, 7.5 words
    run(24'h200000, 9, 0, 1);      // DSP
    run(24'h000010, 0, 1, 1);      // empty image
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
