// DAC buffer and feed-forward look-up table (each 1M x 16, the board's sizes).
// One memory serves two purposes. Its DAC half captures the stream of words written to
// the DACs (from cap_start until freeze) or supplies words to the DACs instead of
// the controller (playback, words read in order, looping over pb_len). Its LUT half
// holds the feed-forward constants that the output stage adds to the controller result.
// A programmed-I/O port reads and writes both halves (pio_addr[AW] selects the LUT)
// without disturbing the control loop.
// The functions follow the board description; that capture stops on a freeze input,
// and the modelling of the external memory as arrays with separate ports, are this
// design's choices.
// Timing: LUT and playback reads return data one cycle after the address / pb_rd;
// PIO reads one cycle after pio_en.
module dac_buffer #(
  parameter int AW = 20,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          rst,
  // capture of the DAC bus
  input  logic          cap_start,    // pulse: start capturing at word 0
  input  logic          freeze,       // pulse: stop capturing
  input  logic          dac_wr,
  input  logic [DW-1:0] dac_data,
  output logic [AW-1:0] cap_ptr,
  output logic          capturing,
  // playback
  input  logic          pb_rd,
  input  logic [AW-1:0] pb_len,       // 0 means the whole half
  output logic [DW-1:0] pb_rdata,
  input  logic          pb_restart,
  // LUT
  input  logic [AW-1:0] lut_addr,
  output logic [DW-1:0] lut_rdata,
  // programmed I/O
  input  logic          pio_en,
  input  logic          pio_we,
  input  logic [AW:0]   pio_addr,
  input  logic [DW-1:0] pio_wdata,
  output logic [DW-1:0] pio_rdata
);
  logic [DW-1:0] dmem [2**AW];
  logic [DW-1:0] lmem [2**AW];
  logic [AW-1:0] pb_ptr;
  logic          cap_on;

  assign capturing = cap_on;

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_on  <= 1'b0;
      cap_ptr <= '0;
    end else if (freeze) begin
      cap_on <= 1'b0;
    end else if (cap_start) begin
      cap_on  <= 1'b1;
      cap_ptr <= '0;
    end else if (cap_on && dac_wr) begin
      cap_ptr <= cap_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || pb_restart) pb_ptr <= '0;
    else if (pb_rd)        pb_ptr <= (pb_len != '0 && pb_ptr == pb_len - 1'b1) ? '0 : pb_ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (cap_on && dac_wr)                     dmem[cap_ptr] <= dac_data;
    if (pio_en && pio_we && !pio_addr[AW])    dmem[pio_addr[AW-1:0]] <= pio_wdata;
    if (pb_rd) pb_rdata <= dmem[pb_ptr];
    if (pio_en && !pio_addr[AW]) pio_rdata <= dmem[pio_addr[AW-1:0]];
    else if (pio_en)             pio_rdata <= lmem[pio_addr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (pio_en && pio_we && pio_addr[AW]) lmem[pio_addr[AW-1:0]] <= pio_wdata;
    lut_rdata <= lmem[lut_addr];
  end
endmodule
