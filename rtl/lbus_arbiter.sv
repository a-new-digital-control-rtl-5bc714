// Local-bus arbiter and address decoder.
// Several bus masters (on this board: configuration controller, VME interface, DSP and
// Xilinx chip) share one local bus; the arbiter lets one of them transfer at a time, and
// the decoder steers the granted transfer to the static RAM, the FLASH, the control and
// status registers, the Xilinx chip or the DSP. That a bus arbiter chooses among these masters
// follows the board description; the policy is this design's own: fixed priority
// (master 0 highest), and the grant is held from the cycle after the request until the
// slave's ack, so a transfer is never interrupted. Unmapped addresses are acknowledged
// with read data 0 so that no master can hang.
// Timing: grant one cycle after cyc rises; the slave's ack passes straight back.
module lbus_arbiter
  import lbus_pkg::*;
#(
  parameter int NM = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  lb_req_t m_req [NM],
  output lb_rsp_t m_rsp [NM],
  output lb_req_t s_req [NS],  // indexed by slave_e: SRAM, FLASH, CSR, XLX, DSP
  input  lb_rsp_t s_rsp [NS]
);
  logic [$clog2(NM)-1:0] owner;
  logic    busy;
  lb_req_t bus;
  slave_e  sel;
  logic    none_ack;
  lb_rsp_t rsp;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (!busy) begin
      for (int i = NM - 1; i >= 0; i--)
        if (m_req[i].cyc) begin
          busy  <= 1'b1;
          owner <= i[$clog2(NM)-1:0];
        end
    end else if (rsp.ack || !m_req[owner].cyc) begin
      busy <= 1'b0;
    end
  end

  always_comb begin
    bus = m_req[owner];
    bus.cyc = busy && m_req[owner].cyc;
    sel = decode(bus.addr);
  end

  always_ff @(posedge clk)
    if (rst) none_ack <= 1'b0;
    else     none_ack <= bus.cyc && sel == SL_NONE && !none_ack;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req[s] = bus;
      s_req[s].cyc = bus.cyc && (sel == slave_e'(s));
    end
    if (sel == SL_NONE) rsp = '{ack: none_ack, rdata: '0};
    else                rsp = s_rsp[sel];
    for (int i = 0; i < NM; i++) begin
      m_rsp[i] = '{ack: 1'b0, rdata: rsp.rdata};
      if (busy && owner == i[$clog2(NM)-1:0]) m_rsp[i].ack = rsp.ack;
    end
  end

  // A slave answers only the transfer in progress.
  a_ack_only_when_busy: assert property (@(posedge clk) disable iff (rst) rsp.ack |-> busy);
endmodule
