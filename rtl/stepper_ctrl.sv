// Stepper-motor interface for the cavity frequency tuner.
// A command moves the motor by a number of steps in a given direction: dir is set,
// and a step pulse (high for half the period) is sent every `period` clock cycles until
// all steps are done. The position counter follows every step (+1 or -1). The step and
// direction outputs follow the system schematic; pulse timing and position counting are
// this design's choices.
// Timing: the first step pulse starts the cycle after start; busy stays high until the
// end of the last period.
module stepper_ctrl (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [15:0]        steps,
  input  logic               dir_in,
  input  logic [15:0]        period,      // clock cycles per step, at least 2
  output logic               step,
  output logic               dir,
  output logic               busy,
  output logic signed [31:0] position
);
  logic [15:0] left, cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0; cnt <= '0; step <= 1'b0; dir <= 1'b0; busy <= 1'b0; position <= '0;
    end else if (!busy) begin
      step <= 1'b0;
      if (start && steps != 0) begin
        busy <= 1'b1; left <= steps; dir <= dir_in; cnt <= '0;
      end
    end else begin
      if (cnt == 0) begin
        step <= 1'b1;
        position <= dir ? position - 1 : position + 1;
      end else if (cnt == period >> 1) begin
        step <= 1'b0;
      end
      if (cnt == period - 1'b1) begin
        cnt <= '0;
        left <= left - 1'b1;
        if (left == 1) begin busy <= 1'b0; step <= 1'b0; end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
