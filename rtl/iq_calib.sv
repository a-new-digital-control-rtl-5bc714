// IQ calibration: multiplies a measured field vector by a complex calibration
// coefficient, which corrects the amplitude scale and phase offset of one signal path.
// The board description says only that the digital data are calibrated; the complex
// multiply is this design's choice. Coefficients are signed with CF fraction bits
// (CF = 16: 1.0 is 65536) and CW = 18 bits wide to fit the FPGA's 18 x 18 hardware
// multipliers. Result: out = (c_re + j c_im)(in_i + j in_q) >> CF, saturated to OW bits.
// Timing: one register stage; out_valid follows in_valid by one cycle.
module iq_calib #(
  parameter int IW = 15,
  parameter int CW = 18,
  parameter int CF = 16,
  parameter int OW = 18
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_i,
  input  logic signed [IW-1:0] in_q,
  input  logic signed [CW-1:0] c_re,
  input  logic signed [CW-1:0] c_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q
);
  localparam int PW = IW + CW + 1;
  logic signed [PW-1:0] pi_full, pq_full, pi_s, pq_s;

  function automatic logic signed [OW-1:0] sat(input logic signed [PW-1:0] v);
    if (v > PW'(2**(OW-1) - 1))       return {1'b0, {(OW-1){1'b1}}};
    else if (v < -PW'(2**(OW-1)))     return {1'b1, {(OW-1){1'b0}}};
    else                              return v[OW-1:0];
  endfunction

  always_comb begin
    pi_full = PW'(c_re) * PW'(in_i) - PW'(c_im) * PW'(in_q);
    pq_full = PW'(c_re) * PW'(in_q) + PW'(c_im) * PW'(in_i);
    pi_s    = pi_full >>> CF;
    pq_s    = pq_full >>> CF;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= sat(pi_s);
        out_q <= sat(pq_s);
      end
    end
  end
endmodule
