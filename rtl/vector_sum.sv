// Vector sum: adds the calibrated field vectors of two cavity probes so that the
// controller regulates the sum of the cavity fields driven by one klystron (vector-sum
// control, named in the board description; the two probe inputs follow the system
// schematic, which feeds the probe signals Pt1 and Pt2 to the fast-control board).
// The two inputs arrive together (both come from identical pipelines). The sum is
// saturated to W bits, one register stage, out_valid follows a_valid by one cycle.
module vector_sum #(
  parameter int W = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                a_valid,
  input  logic signed [W-1:0] a_i,
  input  logic signed [W-1:0] a_q,
  input  logic signed [W-1:0] b_i,
  input  logic signed [W-1:0] b_q,
  input  logic                b_enable,   // 0: single-cavity control, only input a
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q
);
  function automatic logic signed [W-1:0] sat(input logic signed [W:0] v);
    if (v[W] != v[W-1]) return v[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else                return v[W-1:0];
  endfunction

  logic signed [W:0] si, sq;
  always_comb begin
    si = (W+1)'(a_i) + (b_enable ? (W+1)'(b_i) : '0);
    sq = (W+1)'(a_q) + (b_enable ? (W+1)'(b_q) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= a_valid;
      if (a_valid) begin
        out_i <= sat(si);
        out_q <= sat(sq);
      end
    end
  end
endmodule
