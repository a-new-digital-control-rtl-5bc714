// Testbench for dac_buffer (64-word halves): captures a stream of DAC words and reads it
// back through PIO, checks that freezing stops capture, plays back words in order with
// looping, and reads LUT entries written through PIO on the LUT port.
module tb_dac_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int AW = 6;
  logic cap_start = 0, freeze = 0, dac_wr = 0, pb_rd = 0, pb_restart = 0;
  logic [15:0] dac_data = 0;
  logic [AW-1:0] cap_ptr, pb_len = 0, lut_addr = 0;
  logic capturing;
  logic [15:0] pb_rdata, lut_rdata, pio_rdata;
  logic pio_en = 0, pio_we = 0;
  logic [AW:0] pio_addr = 0;
  logic [15:0] pio_wdata = 0;

  dac_buffer #(.AW(AW), .DW(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask
  task automatic pio_read(input logic [AW:0] a, output logic [15:0] d);
    @(negedge clk); pio_en = 1; pio_we = 0; pio_addr = a;
    @(negedge clk); pio_en = 0; d = pio_rdata;
  endtask
  task automatic pio_write(input logic [AW:0] a, input logic [15:0] d);
    @(negedge clk); pio_en = 1; pio_we = 1; pio_addr = a; pio_wdata = d;
    @(negedge clk); pio_en = 0; pio_we = 0;
  endtask

  logic [15:0] d;
  logic [15:0] sent [40];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // capture 40 DAC words written every second cycle
    @(negedge clk) cap_start = 1; @(negedge clk) cap_start = 0;
    check(capturing, "capturing");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk) dac_wr = 1; dac_data = 16'($urandom); sent[i] = dac_data;
      @(negedge clk) dac_wr = 0;
    end
    @(negedge clk) freeze = 1; @(negedge clk) freeze = 0;
    check(!capturing && cap_ptr == 40, "frozen after 40 words");
    for (int i = 0; i < 10; i++) begin @(negedge clk) dac_wr = 1; dac_data = 16'hdead; end
    @(negedge clk) dac_wr = 0;
    check(cap_ptr == 40, "no capture while frozen");
    for (int i = 0; i < 40; i++) begin
      pio_read({1'b0, AW'(i)}, d); check(d == sent[i], $sformatf("captured word %0d", i));
    end
    // playback of 8 words, looping
    for (int i = 0; i < 8; i++) pio_write({1'b0, AW'(i)}, 16'(i * 111));
    pb_len = 8;
    @(negedge clk) pb_restart = 1; @(negedge clk) pb_restart = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk) pb_rd = 1;
      @(negedge clk) pb_rd = 0;
      check(pb_rdata == 16'((i % 8) * 111), $sformatf("playback %0d", i));
    end
    // LUT
    for (int i = 0; i < 64; i++) pio_write({1'b1, AW'(i)}, 16'(i * 37 + 5));
    for (int i = 0; i < 64; i += 5) begin
      @(negedge clk) lut_addr = AW'(i);
      @(negedge clk);
      check(lut_rdata == 16'(i * 37 + 5), $sformatf("LUT %0d", i));
      pio_read({1'b1, AW'(i)}, d); check(d == 16'(i * 37 + 5), "LUT pio");
    end
    pio_read({1'b0, 6'd3}, d); check(d == 16'(333), "DAC half unchanged by LUT writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
