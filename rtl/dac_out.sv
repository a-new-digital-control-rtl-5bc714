// DAC output stage: feed-forward, drive offset and the shared DAC bus.
// The two DACs (I and Q inputs of the vector modulator) share one 16-bit bus, so each
// controller result is written as two bus words: I with dac_sel = 0, then Q with
// dac_sel = 1. To each component the stage adds a constant drive (the open-loop drive
// used when the feedback is off) and, when enabled, a feed-forward constant from the
// look-up table; the sum is saturated to 16 bits (two's complement). The LUT is read at
// {step, component}; step advances once per IQ pair, wraps after lut_len pairs and
// restarts at ff_restart (e.g. an event trigger). In playback mode the bus words are
// taken from the DAC buffer instead, to drive downstream hardware with known data.
// The LUT and DAC-buffer roles follow the board description; the LUT layout, the
// restart and the drive offset are this design's choices.
// Timing: pairs may arrive every second cycle. The memories answer a read one cycle
// after the address register; the I word is on the bus 3 cycles after in_valid, the Q
// word 4 cycles after.
module dac_out #(
  parameter int W  = 16,
  parameter int LW = 20       // LUT address width: 2^(LW-1) pairs
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  input  logic signed [W-1:0] drive_i,
  input  logic signed [W-1:0] drive_q,
  input  logic                ff_enable,
  input  logic                ff_restart,
  input  logic [LW-2:0]       lut_len,     // number of pairs, 0 means all
  input  logic                playback,
  // LUT read port (data one cycle after address)
  output logic [LW-1:0]       lut_addr,
  input  logic [W-1:0]        lut_rdata,
  // DAC-buffer playback port (data one cycle after pb_rd)
  output logic                pb_rd,
  input  logic [W-1:0]        pb_rdata,
  // shared DAC bus
  output logic [W-1:0]        dac_data,
  output logic                dac_sel,
  output logic                dac_wr
);
  logic [LW-2:0] step;
  logic [2:0]    d;
  logic signed [W-1:0] ua_i, ua_q, ub_i, ub_q;
  logic signed [W+1:0] sum;
  logic          second;

  function automatic logic [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > (W+2)'(2**(W-1) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (v < -(W+2)'(2**(W-1)))    return {1'b1, {(W-1){1'b0}}};
    return v[W-1:0];
  endfunction

  // d[0]: Q address cycle, d[1]: I word computed, d[2]: Q word computed
  always_ff @(posedge clk) begin
    if (rst) begin
      d        <= '0;
      step     <= '0;
      lut_addr <= '0;
      pb_rd    <= 1'b0;
      ua_i <= '0; ua_q <= '0; ub_i <= '0; ub_q <= '0;
    end else begin
      d <= {d[1:0], in_valid};
      pb_rd <= playback && (in_valid || d[0]);
      if (in_valid) begin
        ua_i <= in_i;
        ua_q <= in_q;
        lut_addr <= {step, 1'b0};
      end
      if (d[0]) begin
        ub_i <= ua_i;
        ub_q <= ua_q;
        lut_addr <= {step, 1'b1};
      end
      if (ff_restart)
        step <= '0;
      else if (d[0])
        step <= (lut_len != '0 && step == lut_len - 1'b1) ? '0 : step + 1'b1;
    end
  end

  always_comb begin
    second = d[2];
    sum = second ? (W+2)'(ub_q) + (W+2)'(drive_q) : (W+2)'(ub_i) + (W+2)'(drive_i);
    if (ff_enable) sum = sum + (W+2)'($signed(lut_rdata));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_data <= '0;
      dac_sel  <= 1'b0;
      dac_wr   <= 1'b0;
    end else begin
      dac_wr <= d[1] || d[2];
      if (d[1] || d[2]) begin
        dac_sel  <= second;
        dac_data <= playback ? pb_rdata : sat(sum);
      end
    end
  end
endmodule
