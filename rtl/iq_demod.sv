// IQ demodulator for one ADC channel.
// The RF signal is mixed down to an 11.9 MHz IF and sampled at four times that rate, so
// successive samples lie 90 degrees apart on the IF carrier: two successive samples give
// the in-phase (I) and quadrature (Q) parts of the field, as the board description
// states. Over one IF period the samples are I, Q, -I, -Q; this module undoes the sign
// of the second half so that a new (I, Q) pair comes out after every second sample.
// The sign pattern and the phase-reset input are this design's reading.
// Interface: in_valid marks a sample; phase_rst restarts the sample count at 0 (an I
// sample). out_valid pulses, one cycle after each Q sample, with the (I, Q) pair.
module iq_demod #(
  parameter int DW = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 phase_rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW:0]   out_i,
  output logic signed [DW:0]   out_q
);
  logic [1:0] phase;
  logic signed [DW:0] i_hold;
  logic signed [DW:0] s;

  always_comb s = phase[1] ? -((DW+1)'(in_data)) : (DW+1)'(in_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      out_valid <= 1'b0;
      i_hold    <= '0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= phase_rst ? 2'd1 : phase + 2'd1;
        if (phase_rst || !phase[0]) begin
          i_hold <= phase_rst ? (DW+1)'(in_data) : s;
        end else begin
          out_i     <= i_hold;
          out_q     <= s;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
