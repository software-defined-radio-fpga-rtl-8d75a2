// udp_rx: UDP_RX block of the UDP/IP core. It picks from the received frames
// the IPv4/UDP datagrams addressed to this core and hands their payload to
// the user as 32-bit words.
// A frame is accepted when its destination MAC is own_mac or broadcast, it is
// IPv4 (from eth_rx_bridge), its protocol is UDP (17), its destination IP is
// own_ip, its destination port is own_port, and it carries at least RX_BYTES
// payload bytes; the first RX_BYTES are kept. Then rx_rdy rises. Each clock
// with pkt_req high returns the next payload word on pkt_data one clock later
// (first byte in bits 31:24); after the last word rx_rdy falls. Frames that
// arrive while a payload waits to be read are dropped.
// Filtering rules beyond the document's "static IP addresses in the same
// subnet" are the usual ones and this design's choice.
module udp_rx #(
  parameter int RX_BYTES = 132
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] own_mac,
  input  logic [31:0] own_ip,
  input  logic [15:0] own_port,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  input  logic [10:0] rx_idx,
  input  logic        rx_is_ip,
  input  logic        pkt_req,
  output logic        rx_rdy,
  output logic [31:0] pkt_data
);
  localparam int NW = (RX_BYTES + 3) / 4;
  localparam int RW = $clog2(NW + 1);

  logic [7:0]  pbuf [4*NW];
  logic        mac_ok, bcast, hdr_ok;
  logic [31:0] ip_sh;
  logic [15:0] port_sh;
  logic [RW-1:0] rptr;
  logic [10:0] p;

  assign p = rx_idx - 11'd42;

  always_ff @(posedge clk) begin
    if (rx_valid && !rx_rdy && rx_idx >= 11'd42 && rx_idx < 11'(42 + RX_BYTES))
      pbuf[p] <= rx_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mac_ok <= 1'b0; bcast <= 1'b0; hdr_ok <= 1'b0; ip_sh <= '0; port_sh <= '0;
      rx_rdy <= 1'b0; rptr <= '0; pkt_data <= '0;
    end else begin
      if (rx_valid) begin
        if (rx_idx == 11'd0) begin
          mac_ok <= (rx_data == own_mac[47:40]);
          bcast  <= (rx_data == 8'hFF);
          hdr_ok <= 1'b1;
        end else if (rx_idx <= 11'd5) begin
          mac_ok <= mac_ok && (rx_data == own_mac[8*(5 - rx_idx) +: 8]);
          bcast  <= bcast && (rx_data == 8'hFF);
        end
        if (rx_idx == 11'd14 && !rx_is_ip) hdr_ok <= 1'b0;
        if (rx_idx == 11'd23 && rx_data != 8'h11) hdr_ok <= 1'b0;
        if (rx_idx >= 11'd30 && rx_idx <= 11'd33) ip_sh <= {ip_sh[23:0], rx_data};
        if (rx_idx == 11'd36 || rx_idx == 11'd37) port_sh <= {port_sh[7:0], rx_data};
        if (rx_last && !rx_rdy && rx_idx >= 11'(41 + RX_BYTES) &&
            (mac_ok || bcast) && hdr_ok && ip_sh == own_ip && port_sh == own_port) begin
          rx_rdy <= 1'b1;
          rptr   <= '0;
        end
      end
      if (pkt_req && rx_rdy) begin
        pkt_data <= {pbuf[4*rptr], pbuf[4*rptr+1], pbuf[4*rptr+2], pbuf[4*rptr+3]};
        rptr     <= rptr + 1'b1;
        if (rptr == RW'(NW - 1)) rx_rdy <= 1'b0;
      end
    end
  end
endmodule
