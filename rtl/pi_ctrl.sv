// Proportional-integral controller for the I and Q components of the cavity field.
// For each component: e = setpoint - measured, u = Kp*e + sum(Ki*e), saturated to the
// OW-bit DAC range. The integrator is clamped to the same range (anti-windup), and is
// cleared while the loop is open (enable = 0), when the output is 0 and the drive comes
// only from the feed-forward path. That the fast controller is a PI loop, and the gains
// of the measured step response (Kp = 5.5, Ki = 0.1 per microsecond), follow the board
// description; the fixed-point formats are this design's: Kp has 8 fraction bits
// (5.5 = 0x580), Ki has 16 fraction bits and is applied once per IQ update, so
// 0.1/us at 23.8 M updates/s is 0.0042, i.e. 275.
// Timing: one register stage; out_valid follows in_valid by one cycle.
module pi_ctrl #(
  parameter int W   = 18,
  parameter int OW  = 16,
  parameter int GW  = 18,
  parameter int KPF = 8,
  parameter int KIF = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic signed [W-1:0]  sp_i,
  input  logic signed [W-1:0]  sp_q,
  input  logic signed [GW-1:0] kp,
  input  logic signed [GW-1:0] ki,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_i,
  input  logic signed [W-1:0]  in_q,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q,
  output logic                 sat_flag     // output or integrator hit its limit
);
  localparam int EW = W + 1;
  localparam int PW = EW + GW;
  localparam int IW = OW + KIF + 1;          // integrator with fraction bits
  localparam logic signed [PW-1:0] UMAX = PW'(2**(OW-1) - 1);
  localparam logic signed [PW-1:0] UMIN = -PW'(2**(OW-1));

  typedef struct packed {
    logic signed [IW-1:0] integ;
    logic signed [OW-1:0] u;
    logic                 sat;
  } comp_t;

  logic signed [IW-1:0] int_i, int_q;
  comp_t ci, cq;

  function automatic comp_t pi_step(input logic signed [W-1:0] sp, input logic signed [W-1:0] y,
                                 input logic signed [IW-1:0] integ_in,
                                 input logic signed [GW-1:0] kp_v, input logic signed [GW-1:0] ki_v);
    logic signed [EW-1:0] e;
    logic signed [PW-1:0] p, u;
    logic signed [IW+PW-1:0] nint;
    comp_t r;
    e    = EW'(sp) - EW'(y);
    p    = (PW'(kp_v) * PW'(e)) >>> KPF;
    nint = (IW+PW)'(integ_in) + (IW+PW)'(PW'(ki_v) * PW'(e));
    r.sat = 1'b0;
    if (nint > (IW+PW)'(UMAX) <<< KIF) begin
      nint = (IW+PW)'(UMAX) <<< KIF; r.sat = 1'b1;
    end else if (nint < (IW+PW)'(UMIN) <<< KIF) begin
      nint = (IW+PW)'(UMIN) <<< KIF; r.sat = 1'b1;
    end
    r.integ = IW'(nint);
    u = p + PW'(nint >>> KIF);
    if (u > UMAX)      begin u = UMAX; r.sat = 1'b1; end
    else if (u < UMIN) begin u = UMIN; r.sat = 1'b1; end
    r.u = OW'(u);
    return r;
  endfunction

  always_comb begin
    ci = pi_step(sp_i, in_i, int_i, kp, ki);
    cq = pi_step(sp_q, in_q, int_q, kp, ki);
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      int_i     <= '0;
      int_q     <= '0;
      out_i     <= '0;
      out_q     <= '0;
      sat_flag  <= 1'b0;
      out_valid <= rst ? 1'b0 : in_valid;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        int_i    <= ci.integ;
        int_q    <= cq.integ;
        out_i    <= ci.u;
        out_q    <= cq.u;
        sat_flag <= ci.sat | cq.sat;
      end
    end
  end
endmodule
