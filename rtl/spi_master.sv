// spi_master: serial control port of the FMC150 interface core. It writes
// (and reads back) the configuration registers of the CDCE72010 clock PLL,
// the ADS62P49 ADC and the DAC3283 DAC, each on its own chip select.
// A start pulse with dev (0 = CDCE72010, 1 = ADS62P49, 2 = DAC3283), nbits
// (1..32) and wdata sends the top nbits of wdata MSB first in SPI mode 0:
// MOSI changes after the falling SCLK edge, MISO is sampled on the rising
// edge. SCLK runs at clk/(2*CLK_DIV). busy is high during the transfer; done
// pulses for one clock at its end, with the bits shifted in on rdata (LSB
// aligned). A start while busy is ignored.
// The document gives only the block's name and its link to the card's PLL;
// the command interface, mode and divider are this design's choices, and the
// register values are left to the user, as the document does not list them.
module spi_master #(
  parameter int CLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [1:0]  dev,
  input  logic [5:0]  nbits,
  input  logic [31:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [31:0] rdata,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic [2:0]  spi_cs_n
);
  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  logic [DW-1:0] div;
  logic [31:0]   sh;
  logic [5:0]    left;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; sh <= '0; left <= '0; busy <= 1'b0; done <= 1'b0;
      rdata <= '0; spi_sclk <= 1'b0; spi_mosi <= 1'b0; spi_cs_n <= '1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && nbits != 0 && dev != 2'd3) begin
          busy     <= 1'b1;
          sh       <= wdata << (6'd32 - nbits);
          spi_mosi <= wdata[5'(nbits - 1'b1)];
          left     <= nbits;
          rdata    <= '0;
          div      <= '0;
          spi_cs_n <= ~(3'b001 << dev);
        end
      end else if (div == DW'(CLK_DIV - 1)) begin
        div <= '0;
        if (!spi_sclk) begin
          // rising edge: sample MISO
          spi_sclk <= 1'b1;
          rdata    <= {rdata[30:0], spi_miso};
          sh       <= sh << 1;
          left     <= left - 1'b1;
        end else begin
          // falling edge: next bit or end of transfer
          spi_sclk <= 1'b0;
          if (left == 0) begin
            busy     <= 1'b0;
            done     <= 1'b1;
            spi_cs_n <= '1;
          end else begin
            spi_mosi <= sh[31];
          end
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end
endmodule
