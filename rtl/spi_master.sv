// SPI master for the frequency synthesizer's serial interface.
// A write of tx_data with start shifts WORD bits out on mosi, MSB first, while cs_n is
// low; sclk idles low, mosi changes after the falling edge and miso is sampled on the
// rising edge (SPI mode 0). sclk runs at clk / (2 * (div + 1)). The board description
// names a serial (SPI) interface to the synthesizer; word length, mode and clock
// divider are this design's choices.
// Timing: busy rises the cycle after start and falls one half period after the last
// rising sclk edge, when rx_data holds the bits read from miso.
module spi_master #(
  parameter int WORD = 24
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [WORD-1:0] tx_data,
  input  logic [7:0]      div,
  output logic [WORD-1:0] rx_data,
  output logic            busy,
  output logic            sclk,
  output logic            mosi,
  output logic            cs_n,
  input  logic            miso
);
  logic [WORD-1:0] sh;
  logic [7:0]      tick;
  logic [$clog2(WORD+1)-1:0] nbit;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; sclk <= 1'b0; cs_n <= 1'b1; mosi <= 1'b0;
      sh <= '0; tick <= '0; nbit <= '0; rx_data <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1; cs_n <= 1'b0; sh <= tx_data; mosi <= tx_data[WORD-1];
        tick <= div; nbit <= '0; sclk <= 1'b0;
      end
    end else if (tick != 0) begin
      tick <= tick - 1'b1;
    end else begin
      tick <= div;
      if (!sclk) begin
        if (nbit == ($clog2(WORD+1))'(WORD)) begin   // all bits sent
          busy <= 1'b0; cs_n <= 1'b1; rx_data <= sh;
        end else begin
          sclk <= 1'b1;                     // rising edge: sample miso
          sh   <= {sh[WORD-2:0], miso};
          nbit <= nbit + 1'b1;
        end
      end else begin
        sclk <= 1'b0;                       // falling edge: next bit out
        mosi <= sh[WORD-1];
      end
    end
  end
endmodule
