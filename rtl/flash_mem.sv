// FLASH memory: 1.5 Mbytes organised as 1.5M x 8 (the board's size), as a local-bus
// slave. Because bus addresses count 32-bit entities, each byte sits at its own word
// address and reads return it in bits 7:0 (upper bits zero). By convention the first
// third holds DSP code and the remaining two thirds the Xilinx configuration.
// The part's erase/program command sequence is not modelled: a bus write stores the
// byte directly. One-cycle response, like the static RAM.
module flash_mem
  import lbus_pkg::*;
#(
  parameter int DEPTH = 1572864
) (
  input  logic    clk,
  input  logic    rst,
  input  lb_req_t req,
  output lb_rsp_t rsp
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];
  logic [AW-1:0] a;
  logic in_range;

  assign a = req.addr[AW-1:0];
  assign in_range = 32'(a) < DEPTH;

  always_ff @(posedge clk) begin
    if (rst) rsp.ack <= 1'b0;
    else     rsp.ack <= req.cyc && !rsp.ack;
    if (req.cyc && !rsp.ack) begin
      if (req.we && in_range) mem[a] <= req.wdata[7:0];
      rsp.rdata <= in_range ? {24'h0, mem[a]} : 32'h0;
    end
  end
endmodule
