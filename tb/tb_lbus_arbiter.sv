// Testbench for lbus_arbiter: three masters run random reads and writes at the same
// time, each in its own part of every slave, against five slave models here (memories
// answering after 1 to 3 cycles). Checks that every read returns what the same master
// wrote (so transfers never mix), that requests arriving together are served in
// priority order, that only one slave is ever selected, that the slave is chosen by the
// address map, and that an unmapped address is answered with 0.
module tb_lbus_arbiter;
  import lbus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  lb_req_t m_req [3];
  lb_rsp_t m_rsp [3];
  lb_req_t s_req [NS];
  lb_rsp_t s_rsp [NS];

  lbus_arbiter #(.NM(3)) dut (.*);

  // slave models: memory keyed by address, random latency, one-cycle ack
  logic [31:0] smem [NS][int];
  int wrong_slave = 0, multi_sel = 0;
  for (genvar s = 0; s < NS; s++) begin : g_sl
    int lat;
    initial begin
      s_rsp[s] = '0;
      forever begin
        @(posedge clk);
        if (s_req[s].cyc) begin
          if (decode(s_req[s].addr) != slave_e'(s)) wrong_slave++;
          lat = $urandom_range(0, 2);
          repeat (lat) @(posedge clk);
          #1;
          if (s_req[s].we) smem[s][int'(s_req[s].addr)] = s_req[s].wdata;
          s_rsp[s].rdata = smem[s].exists(int'(s_req[s].addr)) ? smem[s][int'(s_req[s].addr)] : 32'hbad;
          s_rsp[s].ack = 1;
          @(posedge clk) #1 s_rsp[s].ack = 0;
        end
      end
    end
  end
  always @(posedge clk) if ($countones({s_req[0].cyc, s_req[1].cyc, s_req[2].cyc, s_req[3].cyc, s_req[4].cyc}) > 1) multi_sel++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int first_ack [3];
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic xfer(input int m, input bit we, input logic [23:0] a, input logic [31:0] wd,
                      output logic [31:0] rd);
    @(negedge clk) m_req[m] = '{cyc: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk); while (!m_rsp[m].ack);
    rd = m_rsp[m].rdata;
    if (first_ack[m] < 0) first_ack[m] = cyc;
    #1 m_req[m].cyc = 1'b0;
  endtask

  localparam logic [23:0] BASES [NS] = '{24'h000000, 24'h200000, 24'h400000, 24'h800000, 24'h600000};
  int done_m = 0;

  for (genvar m = 0; m < 3; m++) begin : g_m
    logic [31:0] mine [int];
    initial begin
      logic [31:0] d;
      logic [23:0] a;
      m_req[m] = LB_IDLE;
      first_ack[m] = -1;
      @(negedge rst);
      repeat (2) @(negedge clk);
      for (int n = 0; n < 300; n++) begin
        a = BASES[$urandom_range(0, NS - 1)] + 24'(m * 16 + $urandom_range(0, 15));
        if (n < 150 || !mine.exists(int'(a))) begin
          d = $urandom; mine[int'(a)] = d;
          xfer(m, 1, a, d, d);
        end else begin
          xfer(m, 0, a, 0, d);
          checks++;
          if (d != mine[int'(a)]) begin failures++; $display("master %0d addr %h got %h want %h", m, a, d, mine[int'(a)]); end
        end
      end
      done_m++;
    end
  end

  logic [31:0] d;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (done_m == 3);
    checks++; if (!(first_ack[0] < first_ack[1] && first_ack[1] < first_ack[2])) begin
      failures++; $display("priority order wrong: %0d %0d %0d", first_ack[0], first_ack[1], first_ack[2]); end
    checks++; if (wrong_slave != 0) begin failures++; $display("wrong slave selected %0d", wrong_slave); end
    checks++; if (multi_sel != 0) begin failures++; $display("several slaves selected"); end
    xfer(2, 0, 24'h700000, 0, d);       // unmapped
    checks++; if (d != 0) begin failures++; $display("unmapped read %h", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
