// sdr_top: the SDR core library put together. It holds the FM receiver
// (FMC150 ADC -> DDC -> double buffer -> UDP/IP over Gigabit Ethernet, with the
// FMC150 DAC and SPI ports passed out) and, side by side on one Wishbone bus,
// the stand-alone FIR, IIR and FFT/IFFT IP cores, each a DSP core behind its
// Wishbone slave control and FIFOs.
// Wishbone map (word addresses wb_adr_i[4:0]): bits 4:3 select the core
// (0 FIR, 1 IIR, 2 FFT; 3 is unmapped and answered with 0), bits 2:0 the
// register inside it (see sdr_pkg::wb_reg_e). The Wishbone cores run on wb_clk
// with the synchronised wb_rst. The FM receiver's ports are those of
// fm_receiver. Core parameters are the defaults of each core; the address
// decoder is this design's.
module sdr_top
  import sdr_pkg::*;
(
  input  logic        wb_clk,
  input  logic        wb_rst_in,
  input  logic [4:0]  wb_adr_i,
  input  logic [31:0] wb_dat_i,
  output logic [31:0] wb_dat_o,
  input  logic        wb_we_i,
  input  logic        wb_stb_i,
  input  logic        wb_cyc_i,
  output logic        wb_ack_o,
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
  fm_receiver u_fm (
    .ext_rst,
    .adc_clkout,
    .adc_data,
    .clk_fast,
    .dac_chc_din,
    .dac_chd_din,
    .dac_data,
    .dac_dclk,
    .dac_frame,
    .spi_start,
    .spi_dev,
    .spi_nbits,
    .spi_wdata,
    .spi_busy,
    .spi_done,
    .spi_rdata,
    .spi_sclk,
    .spi_mosi,
    .spi_miso,
    .spi_cs_n,
    .ftw,
    .sys_clk,
    .own_mac_addr,
    .own_ip_addr,
    .dst_ip_addr,
    .udp_src_port,
    .udp_dst_port,
    .udp_tx_rdy,
    .mac_init_done,
    .dst_mac_addr,
    .udp_rx_pkt_req,
    .udp_rx_rdy,
    .udp_rx_pkt_data,
    .mac_tx_data,
    .mac_tx_valid,
    .mac_tx_sop,
    .mac_tx_eop,
    .mac_tx_ready,
    .mac_rx_data,
    .mac_rx_valid,
    .mac_rx_sop,
    .mac_rx_eop,
    .ddc_vld,
    .ddc_i,
    .ddc_q,
    .packets,
    .overruns,
    .udp_frames,
    .udp_drops);

  // ---------------- Wishbone IP cores ----------------
  logic wb_rst;
  rst_sync u_rs_wb (.clk(wb_clk), .rst_in(wb_rst_in), .rst_out(wb_rst));

  logic [31:0] dat [4];
  logic [3:0]  ack, stb;
  logic        ack3;
  for (genvar s = 0; s < 4; s++) begin : g_sel
    assign stb[s] = wb_stb_i && (wb_adr_i[4:3] == 2'(s));
  end

  wb_fir_ip u_fir (.clk(wb_clk), .rst(wb_rst), .wb_adr_i(wb_adr_i[2:0]), .wb_dat_i,
    .wb_dat_o(dat[0]), .wb_we_i, .wb_stb_i(stb[0]), .wb_cyc_i, .wb_ack_o(ack[0]));
  wb_iir_ip u_iir (.clk(wb_clk), .rst(wb_rst), .wb_adr_i(wb_adr_i[2:0]), .wb_dat_i,
    .wb_dat_o(dat[1]), .wb_we_i, .wb_stb_i(stb[1]), .wb_cyc_i, .wb_ack_o(ack[1]));
  wb_fft_ip u_fft (.clk(wb_clk), .rst(wb_rst), .wb_adr_i(wb_adr_i[2:0]), .wb_dat_i,
    .wb_dat_o(dat[2]), .wb_we_i, .wb_stb_i(stb[2]), .wb_cyc_i, .wb_ack_o(ack[2]));

  // unmapped slot: acknowledge with zero so the master never hangs
  always_ff @(posedge wb_clk) begin
    if (wb_rst) ack3 <= 1'b0;
    else        ack3 <= wb_cyc_i && stb[3] && !ack3;
  end
  assign ack[3] = ack3;
  assign dat[3] = '0;

  assign wb_ack_o = |ack;
  assign wb_dat_o = dat[wb_adr_i[4:3]];
endmodule
