// Testbench for adc_buffer (with a 256-word buffer): the sample stream is a counter, so
// the buffer contents read back through the PIO port show exactly which samples were
// stored. Checks the three trigger modes (start at trigger with a software trigger, stop
// at an external trigger, wait after the trigger), PIO write/read, and playback of
// stored data with looping.
module tb_adc_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int AW = 8;
  logic sample_valid = 0;
  logic signed [13:0] sample = 0;
  logic [1:0] mode = 0;
  logic trig_sel = 0, ext_trig = 0, sw_trig = 0, arm = 0, stop = 0, playback = 0;
  logic [AW-1:0] length = 0, pb_len = 0;
  logic [2:0] state_o;
  logic [AW-1:0] wr_ptr, trig_ptr;
  logic triggered;
  logic signed [13:0] pb_sample;
  logic pio_en = 0, pio_we = 0;
  logic [AW-1:0] pio_addr = 0;
  logic [15:0] pio_wdata = 0, pio_rdata;

  adc_buffer #(.AW(AW), .DW(14)) dut (.*);

  int k = 0;   // sample counter
  always @(negedge clk) if (sample_valid) begin k++; sample = 14'(k); end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  task automatic pio_read(input logic [AW-1:0] a, output logic [15:0] d);
    @(negedge clk); pio_en = 1; pio_we = 0; pio_addr = a;
    @(negedge clk); pio_en = 0; d = pio_rdata;
  endtask

  task automatic pio_write(input logic [AW-1:0] a, input logic [15:0] d);
    @(negedge clk); pio_en = 1; pio_we = 1; pio_addr = a; pio_wdata = d;
    @(negedge clk); pio_en = 0; pio_we = 0;
  endtask

  task automatic pulse_arm(); @(negedge clk) arm = 1; @(negedge clk) arm = 0; endtask

  int T;
  logic [15:0] d;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // PIO
    for (int i = 0; i < 16; i++) pio_write(AW'(i * 7), 16'(i * 1000 + 3));
    for (int i = 0; i < 16; i++) begin
      pio_read(AW'(i * 7), d); check(d == 16'(i * 1000 + 3), "pio readback");
    end
    sample_valid = 1;
    // 1) start at software trigger, store 100 samples
    mode = 0; trig_sel = 1; length = 100;
    pulse_arm();
    repeat (20) @(negedge clk);
    check(state_o == 3'd1, "armed waits for trigger");
    check(wr_ptr == 0, "nothing stored before trigger");
    sw_trig = 1; @(posedge clk) T = int'(sample); @(negedge clk) sw_trig = 0;
    repeat (120) @(negedge clk);
    check(state_o == 3'd4, "start mode done");
    check(wr_ptr == 100, "start mode stored length samples");
    for (int i = 0; i < 100; i += 9) begin
      pio_read(AW'(i), d); check(d == 16'(14'(T + 1 + i)), $sformatf("start mode word %0d = %0d want %0d", i, d, T + 1 + i));
    end
    // 2) continuous storage, stop at external trigger
    mode = 1; trig_sel = 0;
    pulse_arm();
    repeat (400) @(negedge clk);     // wraps the 256-word buffer
    check(state_o == 3'd2, "running");
    ext_trig = 1; @(posedge clk) T = int'(sample); @(negedge clk);
    repeat (5) @(negedge clk); ext_trig = 0;   // held high: one trigger only
    repeat (10) @(negedge clk);
    check(state_o == 3'd4, "stop mode done");
    check(wr_ptr == trig_ptr + 1'b1, "stopped right after trigger sample");
    for (int i = 0; i < 250; i += 13) begin
      pio_read(trig_ptr - AW'(i), d); check(d == 16'(14'(T - i)), $sformatf("stop mode word -%0d = %0d want %0d", i, d, T - i));
    end
    // 3) continuous storage, wait 60 samples after trigger then stop
    mode = 2; trig_sel = 1; length = 60;
    pulse_arm();
    repeat (300) @(negedge clk);
    sw_trig = 1; @(posedge clk) T = int'(sample); @(negedge clk) sw_trig = 0;
    repeat (30) @(negedge clk);
    check(state_o == 3'd3, "waiting after trigger");
    repeat (40) @(negedge clk);
    check(state_o == 3'd4, "delay mode done");
    check(wr_ptr == trig_ptr + 8'd61, "delay mode stored 60 more");
    for (int i = -100; i <= 60; i += 10) begin
      pio_read(trig_ptr + AW'(i), d); check(d == 16'(14'(T + i)), $sformatf("delay mode word %0d", i));
    end
    // 4) stop command while running
    mode = 1; pulse_arm(); repeat (10) @(negedge clk);
    stop = 1; @(negedge clk) stop = 0;
    check(state_o == 3'd4, "stop command");
    // 5) playback of simulated data, looping over 20 words
    for (int i = 0; i < 20; i++) pio_write(AW'(i), 16'(14'(i * 300 - 2000)));
    pb_len = 20; playback = 1;
    @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      check(pb_sample == 14'((i % 20) * 300 - 2000), $sformatf("playback %0d = %0d", i, pb_sample));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
