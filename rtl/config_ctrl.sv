// Configuration controller: a local-bus master that loads the Xilinx chip (or the DSP)
// from the FLASH memory or the static RAM.
// On start it reads the image from the local bus beginning at src_addr and sends it to
// the target as a byte stream (cfg_data with a one-cycle cfg_wr per byte), until len
// bytes have gone out; then done rises. In byte mode (FLASH) each bus word carries one
// byte in bits 7:0; in word mode (static RAM) each word carries four bytes, sent most
// significant first. That such a controller moves configuration data from FLASH or
// static RAM over the local bus follows the board description; the byte stream
// interface and the two packing modes are this design's choices.
// Timing: one bus read (at least 3 cycles with arbitration) then 1 or 4 byte cycles.
module config_ctrl
  import lbus_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [23:0] src_addr,
  input  logic [23:0] len,        // bytes
  input  logic        word_mode,
  input  logic        target_in,  // 0 Xilinx chip, 1 DSP
  output lb_req_t     m_req,
  input  lb_rsp_t     m_rsp,
  output logic [7:0]  cfg_data,
  output logic        cfg_wr,
  output logic        cfg_target,
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {C_IDLE, C_READ, C_SEND} cstate_t;
  cstate_t     st;
  logic [23:0] left;
  logic [31:0] word;
  logic [1:0]  bidx;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; m_req <= LB_IDLE; left <= '0; word <= '0; bidx <= '0;
      cfg_data <= '0; cfg_wr <= 1'b0; cfg_target <= 1'b0; busy <= 1'b0; done <= 1'b0;
    end else begin
      cfg_wr <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          done <= 1'b0; busy <= 1'b1; cfg_target <= target_in; left <= len;
          m_req <= '{cyc: 1'b1, we: 1'b0, addr: src_addr, wdata: '0};
          st <= (len == 0) ? C_IDLE : C_READ;
          if (len == 0) begin busy <= 1'b0; done <= 1'b1; m_req.cyc <= 1'b0; end
        end
        C_READ: if (m_rsp.ack) begin
          m_req.cyc <= 1'b0;
          word <= m_rsp.rdata;
          bidx <= word_mode ? 2'd3 : 2'd0;
          st   <= C_SEND;
        end
        C_SEND: begin
          cfg_data <= word[8*bidx +: 8];
          cfg_wr   <= 1'b1;
          left     <= left - 1'b1;
          if (left == 1) begin
            st <= C_IDLE; busy <= 1'b0; done <= 1'b1;
          end else if (bidx == 0) begin
            m_req.addr <= m_req.addr + 1'b1;
            m_req.cyc  <= 1'b1;
            st <= C_READ;
          end else begin
            bidx <= bidx - 1'b1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
