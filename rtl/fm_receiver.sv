// fm_receiver: wideband digital FM receiver built from the SDR cores
// (Fig. 24 of the design). The FM band (88-108 MHz) is bandpass-sampled by
// the FMC150 ADC at 122.88 MSPS, which folds it to 14.88-34.88 MHz. The DDC
// mixes the chosen station to 0 Hz with its NCO (tuning word ftw), decimates
// by 128 in a 10-stage CIC to 960 kSPS and flattens the CIC droop with a
// 21-tap compensating FIR. Pairs of 16-bit I/Q samples are packed into 32-bit
// words (I in the upper half) and gathered by a 33-word double buffer, and
// every full buffer is sent by the UDP/IP core as a 132-byte UDP payload to
// the host, which demodulates the FM (arctan/differentiation) in software.
//
// Clocks: the ADC's clock (adc_clk, from the FMC150 interface) runs the ADC
// capture, the DDC and the write side of the double buffer; sys_clk (the
// Ethernet clock) runs the read side of the double buffer and the UDP/IP
// core; clk_fast drives the DAC bus. Each domain has its own synchronised
// reset. The ADC channels (A and B, sign-extended from 14 to 16 bits) pass
// through a 2-word SDF channel with rates 1:1 into the DDC, as in the
// dataflow-generated version of this receiver; channel A is the one received.
//
// Everything listed above follows the document; the FMC150's DAC and SPI
// ports are simply passed out, and the receive side of the UDP core is
// brought out unused by the receiver.
module fm_receiver
  import sdr_pkg::*;
#(
  parameter int SAMPLE_RATE_CHANGE1 = 128,
  parameter int NUMBER_OF_STAGES1   = 10,
  parameter int PACKET_SAMPLES      = 33,
  parameter int ARP_RETRY_CYCLES    = 125_000_000
) (
  input  logic        ext_rst,
  // FMC150 ADC bus
  input  logic        adc_clkout,
  input  logic [13:0] adc_data,
  // FMC150 DAC bus
  input  logic        clk_fast,
  input  logic [15:0] dac_chc_din,
  input  logic [15:0] dac_chd_din,
  output logic [7:0]  dac_data,
  output logic        dac_dclk,
  output logic        dac_frame,
  // FMC150 SPI control
  input  logic        spi_start,
  input  logic [1:0]  spi_dev,
  input  logic [5:0]  spi_nbits,
  input  logic [31:0] spi_wdata,
  output logic        spi_busy,
  output logic        spi_done,
  output logic [31:0] spi_rdata,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic [2:0]  spi_cs_n,
  // tuning
  input  logic [31:0] ftw,
  // Ethernet side
  input  logic        sys_clk,
  input  logic [47:0] own_mac_addr,
  input  logic [31:0] own_ip_addr,
  input  logic [31:0] dst_ip_addr,
  input  logic [15:0] udp_src_port,
  input  logic [15:0] udp_dst_port,
  input  logic        udp_tx_rdy,
  output logic        mac_init_done,
  output logic [47:0] dst_mac_addr,
  input  logic        udp_rx_pkt_req,
  output logic        udp_rx_rdy,
  output logic [31:0] udp_rx_pkt_data,
  output logic [7:0]  mac_tx_data,
  output logic        mac_tx_valid,
  output logic        mac_tx_sop,
  output logic        mac_tx_eop,
  input  logic        mac_tx_ready,
  input  logic [7:0]  mac_rx_data,
  input  logic        mac_rx_valid,
  input  logic        mac_rx_sop,
  input  logic        mac_rx_eop,
  // status
  output logic        ddc_vld,
  output logic [15:0] ddc_i,
  output logic [15:0] ddc_q,
  output logic [15:0] packets,
  output logic [15:0] overruns,
  output logic [15:0] udp_frames,
  output logic [15:0] udp_drops
);
  logic adc_clk, adc_rst, sys_rst, dac_rst;
  logic [13:0] cha, chb;

  rst_sync u_rs_adc (.clk(adc_clk),  .rst_in(ext_rst), .rst_out(adc_rst));
  rst_sync u_rs_sys (.clk(sys_clk),  .rst_in(ext_rst), .rst_out(sys_rst));
  rst_sync u_rs_dac (.clk(clk_fast), .rst_in(ext_rst), .rst_out(dac_rst));

  fmc150_core u_fmc (
    .clk(sys_clk), .rst(sys_rst),
    .adc_clkout, .adc_data, .adc_clk, .adc_cha_dout(cha), .adc_chb_dout(chb),
    .clk_fast, .dac_rst, .dac_chc_din, .dac_chd_din, .dac_data, .dac_dclk, .dac_frame,
    .spi_start, .spi_dev, .spi_nbits, .spi_wdata, .spi_busy, .spi_done, .spi_rdata,
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n);

  // ADC -> DDC channel (SDF rates 1:1, depth 2)
  logic [31:0] ch_data;
  logic        ch_fire, ch_put;
  logic [1:0]  ch_cnt;
  sdf_channel #(.DATA_BITS(32), .DEPTH(2), .PRD_RATE(1), .CNS_RATE(1), .INIT_DLY(0)) u_ch1 (
    .clk(adc_clk), .rst(adc_rst),
    .wr_en(!adc_rst), .wr_data({16'($signed(chb)), 16'($signed(cha))}),
    .rd_en(ch_fire), .rd_data(ch_data), .can_put(ch_put), .can_fire(ch_fire), .count(ch_cnt));

  logic ddc_rdy, ddc_clko;
  logic signed [15:0] iout, qout;
  ddc_core #(.SAMPLE_RATE_CHANGE1(SAMPLE_RATE_CHANGE1), .NUMBER_OF_STAGES1(NUMBER_OF_STAGES1)) u_ddc (
    .clk(adc_clk), .rst(adc_rst), .en(ch_fire), .din(ch_data[15:0]), .ftw,
    .loadc(1'b0), .coeff('0), .rdy(ddc_rdy), .vld(ddc_vld), .clko(ddc_clko),
    .iout, .qout);
  assign ddc_i = iout;
  assign ddc_q = qout;

  logic [31:0] pk_data;
  logic        pk_vld, pk_first, pk_last;
  double_buffer #(.N(PACKET_SAMPLES), .WIDTH(32)) u_dbuf (
    .wr_clk(adc_clk), .wr_rst(adc_rst), .wr_en(ddc_vld), .wr_data({iout, qout}),
    .rd_clk(sys_clk), .rd_rst(sys_rst), .out_vld(pk_vld), .out_first(pk_first),
    .out_last(pk_last), .out_data(pk_data), .packets, .overruns);

  logic udp_busy;
  udp1gbe #(.UDP_TX_DATA_BYTE_LENGTH(4 * PACKET_SAMPLES), .UDP_RX_DATA_BYTE_LENGTH(4 * PACKET_SAMPLES),
            .ARP_RETRY_CYCLES(ARP_RETRY_CYCLES)) u_udp (
    .sys_clk, .sys_rst, .own_mac_addr, .own_ip_addr, .dst_ip_addr, .dst_mac_addr,
    .udp_src_port, .udp_dst_port, .mac_init_done,
    .udp_tx_pkt_data(pk_data), .udp_tx_pkt_vld(pk_vld), .udp_tx_rdy,
    .udp_tx_busy(udp_busy), .udp_tx_frames(udp_frames), .udp_tx_drops(udp_drops),
    .udp_rx_pkt_req, .udp_rx_rdy, .udp_rx_pkt_data,
    .mac_tx_data, .mac_tx_valid, .mac_tx_sop, .mac_tx_eop, .mac_tx_ready,
    .mac_rx_data, .mac_rx_valid, .mac_rx_sop, .mac_rx_eop);
endmodule
