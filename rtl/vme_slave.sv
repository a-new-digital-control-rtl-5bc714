// VMEbus interface: an A32/D32 slave that turns VME data transfers into local-bus
// transfers, so that a VME crate controller can reach every local-bus slave.
// The board window is 64 MB: a cycle is accepted when address bits 31:26 equal
// board_base and the address modifier is an A32 data access (0x09 or 0x0D). The
// byte address bits 25:2 become the 24-bit local-bus word address. Strobes are
// synchronised to clk by two flip-flops; address, data and the write line are sampled
// once both strobes are seen low (VME holds them stable by then). The slave asserts
// dtack_n after the local-bus ack, driving read data, and releases it when the data
// strobe goes high. The board implements this interface in a PLD; that it is an A32/D32
// slave follows the board description, the rest is this design's: only single D32
// transfers, no block transfers, no bus errors.
// Timing: DTACK about 5 cycles after DS0 falls for a free local bus.
module vme_slave
  import lbus_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  board_base,
  input  logic        vme_as_n,
  input  logic        vme_ds0_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:2] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  output lb_req_t     m_req,
  input  lb_rsp_t     m_rsp
);
  typedef enum logic [1:0] {V_IDLE, V_BUS, V_DTACK} vstate_t;
  vstate_t st;
  logic [1:0] as_s, ds_s;
  logic as_on, ds_on, hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= 2'b11; ds_s <= 2'b11;
    end else begin
      as_s <= {as_s[0], vme_as_n};
      ds_s <= {ds_s[0], vme_ds0_n};
    end
  end
  assign as_on = !as_s[1];
  assign ds_on = !ds_s[1];
  assign hit   = vme_addr[31:26] == board_base && (vme_am == 6'h09 || vme_am == 6'h0D);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= V_IDLE; m_req <= LB_IDLE; vme_data_o <= '0; vme_data_oe <= 1'b0;
      vme_dtack_n <= 1'b1;
    end else begin
      unique case (st)
        V_IDLE: if (as_on && ds_on && hit) begin
          m_req <= '{cyc: 1'b1, we: !vme_write_n, addr: vme_addr[25:2], wdata: vme_data_i};
          st <= V_BUS;
        end
        V_BUS: if (m_rsp.ack) begin
          m_req.cyc   <= 1'b0;
          vme_data_o  <= m_rsp.rdata;
          vme_data_oe <= !m_req.we;
          vme_dtack_n <= 1'b0;
          st <= V_DTACK;
        end
        V_DTACK: if (!ds_on) begin
          vme_dtack_n <= 1'b1;
          vme_data_oe <= 1'b0;
          st <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end
endmodule
