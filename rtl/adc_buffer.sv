// ADC sample buffer for one ADC channel (1M x 16, the board's size).
// Incoming samples can be stored to capture transient events. Storage is controlled by
// an external or a software trigger in one of three ways, as the board description
// lists them: start storing at the trigger (MODE_START, then length samples are
// stored), store continuously and stop at the trigger (MODE_STOP), or store
// continuously and, after the trigger, wait length more samples before stopping
// (MODE_DELAY). Continuous storage wraps around the buffer. A second, programmed-I/O
// port reads and writes the memory without disturbing capture or the control loop.
// The buffer can also be filled with simulated ADC data and played back (playback = 1):
// pb_sample then replaces the ADC sample, looping over pb_len words.
// Register layout, the edge detection of ext_trig and the modelling of the external
// buffer memory as a two-port array are this design's choices.
// Timing: a sample is written in the cycle it is valid; pb_sample changes in the cycle
// after a valid sample; PIO reads return data one cycle after pio_en.
module adc_buffer #(
  parameter int AW = 20,
  parameter int DW = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sample_valid,
  input  logic signed [DW-1:0] sample,
  // capture control
  input  logic [1:0]           mode,        // 0 START, 1 STOP, 2 DELAY
  input  logic                 trig_sel,    // 0 external, 1 software
  input  logic                 ext_trig,
  input  logic                 sw_trig,
  input  logic                 arm,         // pulse: restart at address 0
  input  logic                 stop,        // pulse: stop storing now
  input  logic [AW-1:0]        length,      // samples to store after start / trigger
  output logic [2:0]           state_o,
  output logic [AW-1:0]        wr_ptr,
  output logic [AW-1:0]        trig_ptr,
  output logic                 triggered,   // pulse when a trigger is accepted
  // playback of simulated data
  input  logic                 playback,
  input  logic [AW-1:0]        pb_len,      // 0 means the whole buffer
  output logic signed [DW-1:0] pb_sample,
  // programmed I/O
  input  logic                 pio_en,
  input  logic                 pio_we,
  input  logic [AW-1:0]        pio_addr,
  input  logic [15:0]          pio_wdata,
  output logic [15:0]          pio_rdata
);
  localparam logic [1:0] MODE_START = 2'd0, MODE_STOP = 2'd1;  // 2: MODE_DELAY
  typedef enum logic [2:0] {S_IDLE, S_ARMED, S_RUN, S_POST, S_DONE} state_t;
  state_t state;

  logic [15:0]   mem [2**AW];
  logic [AW-1:0] cnt, pb_ptr;
  logic          ext_d, trig, store;

  always_ff @(posedge clk)
    if (rst) ext_d <= 1'b0;
    else     ext_d <= ext_trig;
  assign trig = trig_sel ? sw_trig : (ext_trig && !ext_d);
  assign store = sample_valid && !playback && (state == S_RUN || state == S_POST);
  assign state_o = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      wr_ptr    <= '0;
      trig_ptr  <= '0;
      cnt       <= '0;
      triggered <= 1'b0;
    end else begin
      triggered <= 1'b0;
      if (store) wr_ptr <= wr_ptr + 1'b1;
      if (arm) begin
        wr_ptr <= '0;
        cnt    <= '0;
        state  <= (mode == MODE_START) ? S_ARMED : S_RUN;
      end else if (stop) begin
        state <= S_DONE;
      end else begin
        unique case (state)
          S_ARMED: if (trig) begin
            state <= S_RUN; cnt <= '0; trig_ptr <= wr_ptr; triggered <= 1'b1;
          end
          S_RUN: begin
            if (mode == MODE_START) begin
              if (store) begin
                cnt <= cnt + 1'b1;
                if (cnt == length - 1'b1) state <= S_DONE;
              end
            end else if (trig) begin
              trig_ptr <= wr_ptr; triggered <= 1'b1; cnt <= '0;
              state <= (mode == MODE_STOP) ? S_DONE : S_POST;
            end
          end
          S_POST: if (store) begin
            cnt <= cnt + 1'b1;
            if (cnt == length - 1'b1) state <= S_DONE;
          end
          default: ;
        endcase
      end
    end
  end

  // Memory: capture/playback port and programmed-I/O port
  always_ff @(posedge clk) begin
    if (store) mem[wr_ptr] <= 16'($signed(sample));
    if (pio_en && pio_we) mem[pio_addr] <= pio_wdata;
    if (pio_en) pio_rdata <= mem[pio_addr];
  end

  always_ff @(posedge clk) begin
    if (rst || !playback) begin
      pb_ptr    <= '0;
      pb_sample <= '0;
    end else if (sample_valid) begin
      pb_sample <= DW'(mem[pb_ptr]);
      pb_ptr    <= (pb_len != '0 && pb_ptr == pb_len - 1'b1) ? '0 : pb_ptr + 1'b1;
    end
  end
endmodule
