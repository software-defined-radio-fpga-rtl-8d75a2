// udp1gbe: UDP/IP core for Gigabit Ethernet (Fig. 11 of the design). It is the
// UDP wrapper - UDP_TX, UDP_RX, ARP and the TX/RX bridges - that sits in front
// of a tri-mode Ethernet MAC; the MAC itself (and the PHY behind it) is a
// separate third-party core, so its byte-wide client stream is brought out.
// Data path: 32-bit words on udp_tx_pkt_data/udp_tx_pkt_vld fill a payload
// of UDP_TX_DATA_BYTE_LENGTH bytes, which is sent as one UDP datagram to
// dst_ip_addr:udp_dst_port from own_ip_addr:udp_src_port once ARP has found
// the destination MAC (mac_init_done, dst_mac_addr) and udp_tx_rdy allows
// it. Received datagrams for own_ip_addr:udp_src_port with at least
// UDP_RX_DATA_BYTE_LENGTH payload bytes raise udp_rx_rdy and are read word by
// word with udp_rx_pkt_req (data one clock later on udp_rx_pkt_data).
// IP addresses are static inputs and must be in the same subnet, as the
// document says. At 1 Gb/s the MAC takes one byte per 125 MHz clock; sys_clk
// is the clock of this core and of the MAC's client side.
// Port and generic names follow Fig. 11. The meaning given to udp_tx_rdy (a
// transmit enable from the user), the tx status outputs and the stream
// format of the MAC side are this design's choices.
module udp1gbe #(
  parameter int UDP_TX_DATA_BYTE_LENGTH = 132,
  parameter int UDP_RX_DATA_BYTE_LENGTH = 132,
  parameter int ARP_RETRY_CYCLES        = 125_000_000
) (
  input  logic        sys_clk,
  input  logic        sys_rst,
  input  logic [47:0] own_mac_addr,
  input  logic [31:0] own_ip_addr,
  input  logic [31:0] dst_ip_addr,
  output logic [47:0] dst_mac_addr,
  input  logic [15:0] udp_src_port,
  input  logic [15:0] udp_dst_port,
  output logic        mac_init_done,
  input  logic [31:0] udp_tx_pkt_data,
  input  logic        udp_tx_pkt_vld,
  input  logic        udp_tx_rdy,
  output logic        udp_tx_busy,
  output logic [15:0] udp_tx_frames,
  output logic [15:0] udp_tx_drops,
  input  logic        udp_rx_pkt_req,
  output logic        udp_rx_rdy,
  output logic [31:0] udp_rx_pkt_data,
  // MAC client stream
  output logic [7:0]  mac_tx_data,
  output logic        mac_tx_valid,
  output logic        mac_tx_sop,
  output logic        mac_tx_eop,
  input  logic        mac_tx_ready,
  input  logic [7:0]  mac_rx_data,
  input  logic        mac_rx_valid,
  input  logic        mac_rx_sop,
  input  logic        mac_rx_eop
);
  logic [7:0]  rx_data;
  logic        rx_valid, rx_last, rx_is_arp, rx_is_ip;
  logic [10:0] rx_idx;
  logic        a_req, a_last, a_ack, u_req, u_last, u_ack;
  logic [7:0]  a_data, u_data;

  eth_rx_bridge u_rxb (
    .clk(sys_clk), .rst(sys_rst), .mac_rx_data, .mac_rx_valid, .mac_rx_sop, .mac_rx_eop,
    .data(rx_data), .valid(rx_valid), .last(rx_last), .idx(rx_idx),
    .is_arp(rx_is_arp), .is_ip(rx_is_ip));

  arp #(.RETRY_CYCLES(ARP_RETRY_CYCLES)) u_arp (
    .clk(sys_clk), .rst(sys_rst), .own_mac(own_mac_addr), .own_ip(own_ip_addr),
    .dst_ip(dst_ip_addr), .dst_mac(dst_mac_addr), .resolved(mac_init_done),
    .rx_data, .rx_valid, .rx_idx, .rx_is_arp,
    .tx_req(a_req), .tx_data(a_data), .tx_last(a_last), .tx_ack(a_ack));

  udp_tx #(.TX_BYTES(UDP_TX_DATA_BYTE_LENGTH)) u_tx (
    .clk(sys_clk), .rst(sys_rst), .own_mac(own_mac_addr), .dst_mac(dst_mac_addr),
    .dst_valid(mac_init_done), .own_ip(own_ip_addr), .dst_ip(dst_ip_addr),
    .src_port(udp_src_port), .dst_port(udp_dst_port),
    .pkt_data(udp_tx_pkt_data), .pkt_vld(udp_tx_pkt_vld), .tx_en(udp_tx_rdy),
    .busy(udp_tx_busy), .drops(udp_tx_drops), .frames(udp_tx_frames),
    .tx_req(u_req), .tx_data(u_data), .tx_last(u_last), .tx_ack(u_ack));

  udp_rx #(.RX_BYTES(UDP_RX_DATA_BYTE_LENGTH)) u_rx (
    .clk(sys_clk), .rst(sys_rst), .own_mac(own_mac_addr), .own_ip(own_ip_addr),
    .own_port(udp_src_port), .rx_data, .rx_valid, .rx_last, .rx_idx, .rx_is_ip,
    .pkt_req(udp_rx_pkt_req), .rx_rdy(udp_rx_rdy), .pkt_data(udp_rx_pkt_data));

  eth_tx_bridge u_txb (
    .clk(sys_clk), .rst(sys_rst),
    .req0(a_req), .data0(a_data), .last0(a_last), .ack0(a_ack),
    .req1(u_req), .data1(u_data), .last1(u_last), .ack1(u_ack),
    .mac_tx_data, .mac_tx_valid, .mac_tx_sop, .mac_tx_eop, .mac_tx_ready);
endmodule
