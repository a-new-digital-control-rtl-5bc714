// Static RAM: 4 Mbytes organised as 1M x 32 (the board's size), as a local-bus slave.
// Every bus master reaches it, which lets it pass data between devices and hold a
// configuration image. Reads and writes take one cycle: ack (and read data) come in
// the cycle after cyc is seen. The one-cycle response is this design's choice.
module sram
  import lbus_pkg::*;
#(
  parameter int AW = 20
) (
  input  logic    clk,
  input  logic    rst,
  input  lb_req_t req,
  output lb_rsp_t rsp
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (rst) rsp.ack <= 1'b0;
    else     rsp.ack <= req.cyc && !rsp.ack;
    if (req.cyc && !rsp.ack) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      rsp.rdata <= mem[req.addr[AW-1:0]];
    end
  end
endmodule
