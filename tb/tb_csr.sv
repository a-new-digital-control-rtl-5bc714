// Testbench for csr: reads and writes each register group over the local bus and checks
// the side effects: reset and LED lines, DSP flag and interrupt lines, the dipswitch and
// DSP inputs, the event-trigger pulse, the turnmarker counter, the interlock trip latch,
// an SPI transfer (looped back mosi to miso), a stepper move and the configuration
// start pulse with its source, length and mode.
module tb_csr;
  import lbus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  lb_req_t req = LB_IDLE;
  lb_rsp_t rsp;
  logic dsp_reset, xlx_reset, event_trig, spi_sclk, spi_mosi, spi_cs_n, step, dir;
  logic [3:0] leds, dsp_flag_o, dsp_irq;
  logic [7:0] dipsw = 8'hA5;
  logic [3:0] dsp_flag_i = 4'h9;
  logic [1:0] dsp_dmar;
  logic [1:0] dsp_dmag = 2'b10;
  logic interlock_ok = 1, turnmarker = 0;
  logic cfg_start, cfg_word_mode, cfg_target;
  logic [23:0] cfg_src, cfg_len;
  logic cfg_busy = 0, cfg_done = 1;
  logic spi_miso;
  assign spi_miso = spi_mosi;     // loop-back

  csr #(.SPI_WORD(24)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic xfer(input bit we, input logic [3:0] r, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk) req = '{cyc: 1'b1, we: we, addr: CSR_BASE + 24'(r), wdata: wd};
    @(negedge clk);
    check(rsp.ack, "ack");
    rd = rsp.rdata;
    req.cyc = 0;
  endtask

  int nevent = 0, nsteps = 0, ncfg = 0;
  always @(posedge clk) begin
    if (event_trig) nevent++;
    if (cfg_start) ncfg++;
  end
  always @(posedge step) nsteps++;

  logic [31:0] d;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(dsp_reset && !xlx_reset, "reset values");
    xfer(0, 4'd12, 0, d); check(d == 32'h280000, "default config source = Xilinx image in FLASH");
    xfer(1, 4'd0, 32'h000000A2, d);
    check(!dsp_reset && xlx_reset && leds == 4'hA, "CTRL outputs");
    xfer(0, 4'd0, 0, d); check(d == 32'hA2, "CTRL readback");
    xfer(1, 4'd2, 32'h25C, d); check(dsp_flag_o == 4'hC && dsp_irq == 4'h5 && dsp_dmar == 2'b10, "DSP lines");
    xfer(0, 4'd2, 0, d); check(d == 32'h25C, "DSP_OUT readback");
    xfer(0, 4'd3, 0, d); check(d == 32'h29, "DSP inputs");
    xfer(0, 4'd1, 0, d); check(d[7:0] == 8'hA5 && d[8] && !d[9] && d[13], "STATUS");
    // interlock trip latch
    @(negedge clk) interlock_ok = 0; @(negedge clk) interlock_ok = 1;
    xfer(0, 4'd1, 0, d); check(d[9], "trip latched");
    xfer(1, 4'd4, 32'h1, d); @(negedge clk); check(nevent == 1, "event pulse");
    xfer(0, 4'd1, 0, d); check(!d[9], "trip cleared");
    // turnmarker
    repeat (5) begin @(negedge clk) turnmarker = 1; repeat (3) @(negedge clk); turnmarker = 0; @(negedge clk); end
    xfer(0, 4'd11, 0, d); check(d == 5, "turn count");
    // SPI with loop-back
    xfer(1, 4'd7, 32'h1, d);
    xfer(1, 4'd5, 32'h00ABCDEF, d);
    repeat (3) @(negedge clk);
    xfer(0, 4'd1, 0, d); check(d[10], "SPI busy");
    repeat (200) @(negedge clk);
    xfer(0, 4'd6, 0, d); check(d == 32'h00ABCDEF, $sformatf("SPI loop-back %h", d));
    // stepper: 7 steps backwards, period 10
    xfer(1, 4'd9, 32'd10, d);
    xfer(1, 4'd8, 32'h10007, d);
    repeat (100) @(negedge clk);
    xfer(0, 4'd10, 0, d); check($signed(d) == -7 && nsteps == 7 && dir, "stepper move");
    // configuration start
    xfer(1, 4'd12, 32'h000040, d);
    xfer(1, 4'd13, 32'd1234, d);
    xfer(1, 4'd14, 32'h7, d); @(negedge clk);
    check(ncfg == 1 && cfg_src == 24'h40 && cfg_len == 24'd1234 && cfg_word_mode && cfg_target, "config start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
