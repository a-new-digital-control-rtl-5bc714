// Digital filter on the IQ field vector ahead of the PI controller. The board
// description names a digital filter in the loop but not its kind; this design uses a
// first-order low-pass, y[n] = y[n-1] + (x[n] - y[n-1]) / 2^k, one per component, with
// FB extra fraction bits so that small steps are not lost. k = 0 passes x through;
// larger k lowers the corner frequency (about f_update / (2 pi 2^k)).
// Timing: one register stage; out_valid follows in_valid by one cycle.
module iq_lowpass #(
  parameter int W  = 18,
  parameter int FB = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [3:0]          shift_k,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q
);
  localparam int AW = W + FB + 1;
  logic signed [AW-1:0] acc_i, acc_q, nxt_i, nxt_q;

  always_comb begin
    nxt_i = acc_i + (((AW'(in_i) <<< FB) - acc_i) >>> shift_k);
    nxt_q = acc_q + (((AW'(in_q) <<< FB) - acc_q) >>> shift_k);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc_i <= nxt_i;
        acc_q <= nxt_q;
      end
    end
  end

  assign out_i = W'(acc_i >>> FB);
  assign out_q = W'(acc_q >>> FB);
endmodule
