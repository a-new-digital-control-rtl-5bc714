// Testbench for fpga_core at full size, driven over its local-bus slave port: register
// reset values (Kp = 5.5, Ki = 275), PIO access to an ADC buffer and the LUT, open-loop
// drive and feed-forward on the DAC bus, a software-triggered ADC capture read back
// through PIO, DAC-stream capture, and playback of stored IF data through the loop
// (the field registers must show the vector that was stored).
module tb_fpga_core;
  import lbus_pkg::*;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  lb_req_t req = LB_IDLE;
  lb_rsp_t rsp;
  logic adc_valid = 0, ext_trig = 0, event_trig = 0;
  logic signed [13:0] adc [4];
  logic [15:0] dac_data;
  logic dac_sel, dac_wr, pi_sat;

  fpga_core dut (.*);

  localparam logic [23:0] REG = 24'h F00000, ADCB = 24'h800000, DACB = 24'hC00000, LUT = 24'hD00000;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk) req = '{cyc: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk) req.cyc = 0;
  endtask
  task automatic rd(input logic [23:0] a, output logic [31:0] d);
    @(negedge clk) req = '{cyc: 1'b1, we: 1'b0, addr: a, wdata: 0};
    @(negedge clk) d = rsp.rdata; req.cyc = 0;
    check(rsp.ack, "ack");
  endtask

  // ADC inputs: counters, one per channel
  int k = 0;
  always @(negedge clk) begin
    k++;
    for (int c = 0; c < 4; c++) adc[c] = 14'(k + 1000 * c);
  end
  logic [15:0] last_i, last_q;
  always @(negedge clk) if (dac_wr) begin if (dac_sel) last_q = dac_data; else last_i = dac_data; end

  logic [31:0] d, d0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0; adc_valid = 1;
    rd(REG + 7, d); check(d == 32'h580, "Kp reset value 5.5");
    rd(REG + 8, d); check(d == 275, "Ki reset value");
    // PIO
    wr(ADCB + 24'h200123, 32'hBEEF); rd(ADCB + 24'h200123, d); check(d == 32'hBEEF, "ADC buffer 2 PIO");
    for (int i = 0; i < 8; i++) wr(LUT + 24'(i), 32'(i * 100 + 10));
    rd(LUT + 5, d); check(d == 510, "LUT PIO");
    // open loop drive: ADC data are ignored with the loop off
    wr(REG + 9, {16'hFED4, 16'd700});      // Q = -300, I = 700
    wr(REG + 0, 32'h0);
    repeat (20) @(negedge clk);
    check($signed(last_i) == 700 && $signed(last_q) == -300, "open loop drive");
    // feed-forward: LUT pairs 0..3 looping
    wr(REG + 10, 4);
    wr(REG + 0, 32'h4);
    @(negedge clk) event_trig = 1; @(negedge clk) event_trig = 0;
    begin
      int seen_i [int];
      repeat (10) @(negedge clk);
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        if (dac_wr && !dac_sel) seen_i[int'($signed(dac_data))] = 1;
      end
      check(seen_i.size() == 4 && seen_i.exists(710) && seen_i.exists(910) && seen_i.exists(1310) && seen_i.exists(1110),
            $sformatf("feed-forward values (%0d distinct)", seen_i.size()));
    end
    // ADC capture: start at software trigger, 50 samples; DAC capture at the same time
    wr(REG + 11, 32'h4);                  // mode START, software trigger
    wr(REG + 12, 50);
    wr(REG + 0, 32'h204);                 // ff on, DAC capture enabled
    wr(REG + 15, 32'h1);                  // arm
    repeat (10) @(negedge clk);
    rd(REG + 16, d); check(d[2:0] == 3'd1, "armed");
    wr(REG + 15, 32'h2);                  // software trigger
    repeat (80) @(negedge clk);
    rd(REG + 16, d); check(d[2:0] == 3'd4 && d[5], "capture done, trigger seen");
    rd(REG + 17, d); check(d == 50, "50 samples stored");
    rd(ADCB + 24'h300000, d0);
    for (int i = 1; i < 50; i += 7) begin
      rd(ADCB + 24'h300000 + 24'(i), d); check(d[13:0] == 14'(d0 + i), "channel 3 consecutive samples");
    end
    rd(ADCB + 24'h100000, d); check(d[13:0] == 14'(d0 - 2000), "channel 1 captured with channel 3");
    wr(REG + 15, 32'h8);                  // freeze DAC buffer
    rd(REG + 21, d); check(d > 40, "DAC words captured");
    rd(DACB + 2, d); check(d[15:0] == 16'd710 || d[15:0] == 16'd910 || d[15:0] == 16'd1110 || d[15:0] == 16'd1310, "DAC buffer content");
    // playback of stored IF data: I = 2000, Q = -700 in channel 0, 4 words
    wr(ADCB + 0, 2000); wr(ADCB + 1, 32'(-700) & 32'hFFFF); wr(ADCB + 2, 32'(-2000) & 32'hFFFF); wr(ADCB + 3, 700);
    wr(REG + 13, 4);
    wr(REG + 0, 32'h10);                  // ADC playback, probe B off
    repeat (30) @(negedge clk);
    rd(REG + 19, d); check($signed(d[17:0]) == 2000, $sformatf("field I from playback %0d", $signed(d[17:0])));
    rd(REG + 20, d); check($signed(d[17:0]) == -700, $sformatf("field Q from playback %0d", $signed(d[17:0])));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
