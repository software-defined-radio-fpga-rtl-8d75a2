// arp: Address Resolution Protocol block of the UDP/IP core. It resolves the
// destination's MAC address before UDP data is sent, and answers the
// requests of other hosts for this core's own address.
// Resolution: while dst_mac is unknown, an ARP request for dst_ip is
// broadcast at once after reset and again RETRY_CYCLES clocks after the
// previous request has been sent. A reply
// (operation 2) whose sender IP is dst_ip sets dst_mac and raises resolved.
// Answering: a request (operation 1) whose target IP is own_ip makes the
// block send a reply to the requester with own_mac/own_ip.
// Frames are the 42-byte Ethernet + ARP headers (the MAC pads them to the
// minimum length and adds the FCS). RX bytes come numbered from
// eth_rx_bridge; TX bytes go out through eth_tx_bridge (req/data/last/ack).
// The protocol is the standard one; the retry interval is this design's
// choice (the document only names ARP's role).
module arp #(
  parameter int RETRY_CYCLES = 125_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] own_mac,
  input  logic [31:0] own_ip,
  input  logic [31:0] dst_ip,
  output logic [47:0] dst_mac,
  output logic        resolved,
  // numbered receive stream
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic [10:0] rx_idx,
  input  logic        rx_is_arp,
  // transmit
  output logic        tx_req,
  output logic [7:0]  tx_data,
  output logic        tx_last,
  input  logic        tx_ack
);
  localparam int RW = $clog2(RETRY_CYCLES + 1);

  // ---------------- receive ----------------
  logic [7:0]  r_oper;
  logic [47:0] r_sha;
  logic [31:0] r_spa, r_tpa;
  logic        reply_pend;
  logic [47:0] reply_mac;
  logic [31:0] reply_ip;

  // ---------------- transmit state ----------------
  logic        sending, kind_reply;
  logic [5:0]  tidx;
  logic [RW-1:0] timer;
  logic [47:0] t_mac;
  logic [31:0] t_ip;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_oper <= '0; r_sha <= '0; r_spa <= '0; r_tpa <= '0;
      reply_pend <= 1'b0; reply_mac <= '0; reply_ip <= '0;
      dst_mac <= '0; resolved <= 1'b0;
      sending <= 1'b0; kind_reply <= 1'b0; tidx <= '0; timer <= '0;
      t_mac <= '0; t_ip <= '0;
    end else begin
      // receive side
      if (rx_valid) begin
        if (rx_idx == 11'd21) r_oper <= rx_data;
        if (rx_idx >= 11'd22 && rx_idx <= 11'd27) r_sha <= {r_sha[39:0], rx_data};
        if (rx_idx >= 11'd28 && rx_idx <= 11'd31) r_spa <= {r_spa[23:0], rx_data};
        if (rx_idx >= 11'd38 && rx_idx <= 11'd41) r_tpa <= {r_tpa[23:0], rx_data};
      end
      if (rx_valid && rx_is_arp && rx_idx == 11'd41) begin
        if (r_oper == 8'd1 && {r_tpa[23:0], rx_data} == own_ip) begin
          reply_pend <= 1'b1;
          reply_mac  <= r_sha;
          reply_ip   <= r_spa;
        end
        if (r_oper == 8'd2 && r_spa == dst_ip) begin
          dst_mac  <= r_sha;
          resolved <= 1'b1;
        end
      end

      // transmit side
      if (!sending) begin
        if (timer != '0) timer <= timer - 1'b1;
        if (reply_pend) begin
          sending <= 1'b1; kind_reply <= 1'b1; tidx <= '0;
          t_mac <= reply_mac; t_ip <= reply_ip; reply_pend <= 1'b0;
        end else if (!resolved && timer == '0) begin
          sending <= 1'b1; kind_reply <= 1'b0; tidx <= '0;
          t_mac <= '0; t_ip <= dst_ip;
          timer <= RW'(RETRY_CYCLES);
        end
      end else if (tx_ack) begin
        tidx <= tidx + 1'b1;
        if (tidx == 6'd41) sending <= 1'b0;
      end
    end
  end

  // byte i of the outgoing frame
  always_comb begin
    logic [47:0] eth_dst;
    eth_dst = kind_reply ? t_mac : 48'hFFFF_FFFF_FFFF;
    tx_data = 8'h00;
    unique case (tidx) inside
      [6'd0:6'd5]:   tx_data = eth_dst[8*(5 - tidx) +: 8];
      [6'd6:6'd11]:  tx_data = own_mac[8*(11 - tidx) +: 8];
      6'd12:         tx_data = 8'h08;
      6'd13:         tx_data = 8'h06;
      6'd15:         tx_data = 8'h01;              // HTYPE Ethernet
      6'd16:         tx_data = 8'h08;              // PTYPE IPv4
      6'd18:         tx_data = 8'h06;              // HLEN
      6'd19:         tx_data = 8'h04;              // PLEN
      6'd21:         tx_data = kind_reply ? 8'h02 : 8'h01;
      [6'd22:6'd27]: tx_data = own_mac[8*(27 - tidx) +: 8];
      [6'd28:6'd31]: tx_data = own_ip[8*(31 - tidx) +: 8];
      [6'd32:6'd37]: tx_data = t_mac[8*(37 - tidx) +: 8];
      [6'd38:6'd41]: tx_data = t_ip[8*(41 - tidx) +: 8];
      default:       tx_data = 8'h00;
    endcase
  end
  assign tx_req  = sending;
  assign tx_last = (tidx == 6'd41);
endmodule
