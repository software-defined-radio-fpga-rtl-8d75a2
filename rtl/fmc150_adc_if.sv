// fmc150_adc_if: capture of the ADS62P49 dual-channel 14-bit ADC on the FMC150
// card. The ADC sends both channels interleaved on one 14-line double-data-rate
// (DDR) bus, clocked by its own ADC_CLKOUT (61.44 MHz in the reference setup,
// i.e. 122.88 Mbps per line). Here channel A is the word present at the rising
// edge and channel B the word at the following falling edge; both are
// registered again on the next rising edge, so the pair leaves together, two
// rising edges after channel A arrived, on adc_clk (ADC_CLKOUT forwarded as
// the sample clock of the design; a netlist check sees it as an output wired
// straight to an input, which is intended).
// The samples are two's complement as delivered by the ADC.
// The bus width, rates and port names follow Fig. 10; which channel owns
// which edge and the two's-complement format are this design's assumptions.
// On an FPGA the two edge registers are the I/O block's DDR input flip-flops.
module fmc150_adc_if #(
  parameter int ADC_WIDTH = 14
) (
  input  logic                 adc_clkout,
  input  logic [ADC_WIDTH-1:0] adc_data,
  output logic                 adc_clk,
  output logic [ADC_WIDTH-1:0] adc_cha_dout,
  output logic [ADC_WIDTH-1:0] adc_chb_dout
);
  logic [ADC_WIDTH-1:0] a_q, b_q;

  assign adc_clk = adc_clkout;

  always_ff @(posedge adc_clkout) a_q <= adc_data;
  always_ff @(negedge adc_clkout) b_q <= adc_data;

  always_ff @(posedge adc_clkout) begin
    adc_cha_dout <= a_q;
    adc_chb_dout <= b_q;
  end
endmodule
