// Testbench for dac_out: feeds a controller result every second cycle and checks the
// shared DAC bus: I word 3 cycles after the result, Q word the cycle after, each the
// saturated sum of result, drive offset and the LUT entry {step, component}; LUT
// wrap-around and restart; and playback of DAC-buffer words in order.
// The LUT and the playback source are modelled here as one-cycle-latency memories.
module tb_dac_out;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LW = 6;
  logic in_valid = 0, ff_enable = 0, ff_restart = 0, playback = 0;
  logic signed [15:0] in_i = 0, in_q = 0, drive_i = 0, drive_q = 0;
  logic [LW-2:0] lut_len = 0;
  logic [LW-1:0] lut_addr;
  logic [15:0] lut_rdata, pb_rdata, dac_data;
  logic pb_rd, dac_sel, dac_wr;

  dac_out #(.W(16), .LW(LW)) dut (.*);

  logic [15:0] lut [2**LW];
  logic [15:0] pbm [16];
  int pb_ptr = 0;
  always_ff @(posedge clk) begin
    lut_rdata <= lut[lut_addr];
    if (pb_rd) begin pb_rdata <= pbm[pb_ptr % 16]; pb_ptr <= pb_ptr + 1; end
  end

  typedef struct { logic [15:0] d; logic s; int t; } exp_t;
  exp_t q[$];
  int cyc = 0, step = 0, nsat = 0;
  always @(posedge clk) cyc++;

  function automatic logic [15:0] sat(int v);
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  // checker
  always @(negedge clk) if (!rst && dac_wr) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected DAC write"); end
    else begin
      e = q.pop_front();
      if (dac_data != e.d || dac_sel != e.s || cyc != e.t) begin
        failures++;
        if (failures < 10) $display("got %h sel%0d at %0d want %h sel%0d at %0d", dac_data, dac_sel, cyc, e.d, e.s, e.t);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pair(input int mode);   // mode 0 normal, 1 playback
    int ei, eq, ff_i, ff_q;
    @(negedge clk);
    in_valid = 1;
    in_i = 16'($urandom); in_q = 16'($urandom);
    ff_i = ff_enable ? int'($signed(lut[{step[LW-2:0], 1'b0}])) : 0;
    ff_q = ff_enable ? int'($signed(lut[{step[LW-2:0], 1'b1}])) : 0;
    ei = int'(in_i) + int'(drive_i) + ff_i;
    eq = int'(in_q) + int'(drive_q) + ff_q;
    if (ei > 32767 || ei < -32768) nsat++;
    if (mode == 1) begin
      q.push_back('{pbm[(2*step) % 16], 1'b0, cyc + 3});
      q.push_back('{pbm[(2*step + 1) % 16], 1'b1, cyc + 4});
    end else begin
      q.push_back('{sat(ei), 1'b0, cyc + 3});
      q.push_back('{sat(eq), 1'b1, cyc + 4});
    end
    step = (lut_len != 0 && step == lut_len - 1) ? 0 : step + 1;
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    foreach (lut[i]) lut[i] = 16'($urandom);
    foreach (pbm[i]) pbm[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    drive_i = 16'sd1000; drive_q = -16'sd500;
    for (int n = 0; n < 40; n++) pair(0);            // no feed-forward
    repeat (6) @(negedge clk);
    @(negedge clk) ff_restart = 1; step = 0;
    @(negedge clk) ff_restart = 0; ff_enable = 1; lut_len = 5;
    for (int n = 0; n < 40; n++) pair(0);            // LUT wraps every 5 pairs
    repeat (6) @(negedge clk);
    @(negedge clk) ff_restart = 1; step = 0; lut_len = 0;
    @(negedge clk) ff_restart = 0;
    for (int n = 0; n < 60; n++) pair(0);            // whole LUT, wraps at 32
    repeat (6) @(negedge clk);
    playback = 1; step = 0; pb_ptr = 0;
    for (int n = 0; n < 20; n++) pair(1);
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words missing", q.size()); end
    checks++;
    if (nsat == 0) begin failures++; $display("no saturating sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
