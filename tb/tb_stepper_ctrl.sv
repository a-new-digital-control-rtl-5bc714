// Testbench for stepper_ctrl: counts step pulses and measures their spacing for moves
// in both directions, and checks the direction line and the position counter.
module tb_stepper_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, dir_in = 0;
  logic [15:0] steps = 0, period = 0;
  logic step, dir, busy;
  logic signed [31:0] position;

  stepper_ctrl dut (.*);

  int npulse = 0, cyc = 0, last_rise = -1, bad_spacing = 0;
  logic step_d = 0;
  always @(posedge clk) begin
    cyc++;
    step_d <= step;
    if (step && !step_d) begin
      if (last_rise >= 0 && cyc - last_rise != period) bad_spacing++;
      last_rise = cyc; npulse++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos;
  initial begin
    pos = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6; n++) begin
      npulse = 0; last_rise = -1; bad_spacing = 0;
      steps = 16'($urandom_range(1, 40)); period = 16'($urandom_range(2, 30)); dir_in = n[0];
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (!busy);
      repeat (3) @(negedge clk);
      pos += dir_in ? -int'(steps) : int'(steps);
      checks++; if (npulse != steps) begin failures++; $display("%0d pulses want %0d", npulse, steps); end
      checks++; if (bad_spacing != 0) begin failures++; $display("pulse spacing wrong"); end
      checks++; if (dir != dir_in) begin failures++; $display("dir wrong"); end
      checks++; if (position != pos) begin failures++; $display("position %0d want %0d", position, pos); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
