// Testbench for spi_master: a mode-0 SPI slave model here receives the word shifted out
// on mosi and returns its own word on miso; both words are checked, as is the sclk
// period set by the divider.
module tb_spi_master;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, miso;
  logic [23:0] tx_data = 0, rx_data;
  logic [7:0] div = 0;
  logic busy, sclk, mosi, cs_n;

  spi_master #(.WORD(24)) dut (.*);

  // slave model
  logic [23:0] slave_rx, slave_tx;
  int nedge;
  assign miso = slave_tx[23];
  always @(posedge sclk) if (!cs_n) begin slave_rx = {slave_rx[22:0], mosi}; nedge++; end
  always @(negedge sclk) if (!cs_n) slave_tx = {slave_tx[22:0], 1'b0};

  int cyc = 0, t_first, t_second;
  always @(posedge clk) cyc++;
  always @(posedge sclk) begin t_first = t_second; t_second = cyc; end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 8; n++) begin
      div = 8'(n);
      slave_tx = 24'($urandom); nedge = 0;
      begin
        logic [23:0] exp_miso;
        exp_miso = slave_tx;
        @(negedge clk) tx_data = 24'($urandom); start = 1;
        @(negedge clk) start = 0;
        checks++; if (!busy || cs_n) begin failures++; $display("not busy"); end
        wait (!busy);
        @(negedge clk);
        checks++; if (slave_rx != tx_data) begin failures++; $display("slave got %h want %h", slave_rx, tx_data); end
        checks++; if (rx_data != exp_miso) begin failures++; $display("master got %h want %h", rx_data, exp_miso); end
        checks++; if (nedge != 24) begin failures++; $display("%0d edges", nedge); end
        checks++; if (t_second - t_first != 2 * (n + 1)) begin failures++; $display("sclk period %0d", t_second - t_first); end
        checks++; if (!cs_n) begin failures++; $display("cs_n still low"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
