// Testbench for vme_slave: a VME master model here runs A32/D32 write and read cycles
// (address and data set up, AS and DS0 asserted, wait for DTACK, release) against a
// local-bus memory model. Checks the data both ways, the byte-to-word address mapping,
// that cycles to another board or with a non-A32 address modifier get no DTACK, and
// that DTACK is released after DS0.
module tb_vme_slave;
  import lbus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] board_base = 6'h11;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_write_n = 1;
  logic [5:0] vme_am = 6'h09;
  logic [31:2] vme_addr = 0;
  logic [31:0] vme_data_i = 0, vme_data_o;
  logic vme_data_oe, vme_dtack_n;
  lb_req_t m_req;
  lb_rsp_t m_rsp;

  vme_slave dut (.*);

  logic [31:0] lmem [int];
  initial begin
    m_rsp = '0;
    forever begin
      @(posedge clk);
      if (m_req.cyc && !m_rsp.ack) begin
        repeat ($urandom_range(1, 4)) @(posedge clk);
        #1;
        if (m_req.we) lmem[int'(m_req.addr)] = m_req.wdata;
        m_rsp = '{ack: 1'b1, rdata: lmem.exists(int'(m_req.addr)) ? lmem[int'(m_req.addr)] : 32'h0};
        @(posedge clk) #1 m_rsp.ack = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // VME master: returns 1 if DTACK came within 100 cycles
  task automatic vme(input bit wr, input logic [31:0] a, input logic [5:0] am,
                     input logic [31:0] wd, output logic [31:0] rd, output bit acked);
    #3 vme_addr = a[31:2]; vme_am = am; vme_write_n = !wr; vme_data_i = wd;
    #7 vme_as_n = 0;
    #5 vme_ds0_n = 0;
    acked = 0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk);
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    #2 rd = vme_data_o;
    if (acked && !wr) begin checks++; if (!vme_data_oe) begin failures++; $display("data not driven"); end end
    vme_ds0_n = 1; vme_as_n = 1;
    if (acked) begin
      repeat (4) @(posedge clk);
      checks++; if (!vme_dtack_n || vme_data_oe) begin failures++; $display("DTACK not released"); end
    end
  endtask

  logic [31:0] d, wd;
  bit ok;
  logic [31:0] a;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 40; n++) begin
      a = {6'h11, 26'($urandom_range(0, 255) * 4)};
      wd = $urandom;
      vme(1, a, (n % 2) ? 6'h0D : 6'h09, wd, d, ok);
      checks++; if (!ok) begin failures++; $display("write not acknowledged"); end
      checks++; if (lmem[int'(a[25:2])] != wd) begin failures++; $display("local word %h wrong", a[25:2]); end
      vme(0, a, 6'h09, 0, d, ok);
      checks++; if (!ok || d != wd) begin failures++; $display("read %h want %h", d, wd); end
    end
    vme(1, {6'h12, 26'h40}, 6'h09, 32'h1, d, ok);
    checks++; if (ok) begin failures++; $display("other board answered"); end
    vme(1, {6'h11, 26'h40}, 6'h29, 32'h1, d, ok);   // A16 modifier
    checks++; if (ok) begin failures++; $display("A16 cycle answered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
