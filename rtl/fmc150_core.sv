// fmc150_core: FPGA side of the 4DSP FMC150 ADC/DAC daughter card (Fig. 10 of
// the design): the ADC LVDS interface (fmc150_adc_if), the DAC LVDS
// interface (fmc150_dac_if) and the SPI control of the card's clock PLL, ADC
// and DAC (spi_master).
// Clocks: adc_clkout comes from the ADC (61.44 MHz in the reference setup);
// clk_fast (245.76 MHz) and the 61.44 MHz DAC sample clock come from the
// FPGA's clock manager fed by the card's CLK_TO_FPGA, which is a vendor
// primitive outside this RTL; clk is the control clock of the SPI port.
// The DDR LVDS pads are modelled by edge registers (see the two interface
// modules); differential buffers are left to the pad ring.
// adc_clk is adc_clkout passed straight through (the ADC's clock, used by the
// rest of the design as its sample clock), so a netlist check reports it as
// an output wired to an input; that is intended.
module fmc150_core #(
  parameter int ADC_WIDTH   = 14,
  parameter int SPI_CLK_DIV = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // ADC side
  input  logic                 adc_clkout,
  input  logic [ADC_WIDTH-1:0] adc_data,
  output logic                 adc_clk,
  output logic [ADC_WIDTH-1:0] adc_cha_dout,
  output logic [ADC_WIDTH-1:0] adc_chb_dout,
  // DAC side
  input  logic                 clk_fast,
  input  logic                 dac_rst,
  input  logic [15:0]          dac_chc_din,
  input  logic [15:0]          dac_chd_din,
  output logic [7:0]           dac_data,
  output logic                 dac_dclk,
  output logic                 dac_frame,
  // SPI control
  input  logic                 spi_start,
  input  logic [1:0]           spi_dev,
  input  logic [5:0]           spi_nbits,
  input  logic [31:0]          spi_wdata,
  output logic                 spi_busy,
  output logic                 spi_done,
  output logic [31:0]          spi_rdata,
  output logic                 spi_sclk,
  output logic                 spi_mosi,
  input  logic                 spi_miso,
  output logic [2:0]           spi_cs_n
);
  fmc150_adc_if #(.ADC_WIDTH(ADC_WIDTH)) u_adc (
    .adc_clkout, .adc_data, .adc_clk, .adc_cha_dout, .adc_chb_dout);

  fmc150_dac_if u_dac (
    .clk_fast, .rst(dac_rst), .dac_chc_din, .dac_chd_din, .dac_data, .dac_dclk, .dac_frame);

  spi_master #(.CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk, .rst, .start(spi_start), .dev(spi_dev), .nbits(spi_nbits), .wdata(spi_wdata),
    .busy(spi_busy), .done(spi_done), .rdata(spi_rdata), .spi_sclk, .spi_mosi, .spi_miso,
    .spi_cs_n);
endmodule
