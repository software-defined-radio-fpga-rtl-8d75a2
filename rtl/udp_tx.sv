// udp_tx: UDP_TX block of the UDP/IP core. It collects one payload of
// TX_BYTES bytes from 32-bit words and sends it as an Ethernet/IPv4/UDP frame.
// Words written with pkt_vld go into a payload buffer, first byte in bits
// 31:24 (so a word {I[15:0], Q[15:0]} puts the in-phase part first, as in
// the document's packet format). When TX_BYTES bytes are in, tx_en is high
// and the destination MAC is known (dst_valid), the frame is sent through the
// TX bridge: 14-byte Ethernet header (EtherType 0x0800), 20-byte IPv4 header
// (no options, DF set, TTL 64, protocol 17, identification counting frames,
// header checksum computed here), 8-byte UDP header (checksum 0, i.e. not
// used, which IPv4 allows) and the payload. busy is high while a payload is
// being sent. The source is expected to write whole payloads (TX_BYTES/4
// words each); a payload that arrives while the buffer is still full or being
// sent is dropped whole, word by word counted in drops, so every datagram
// carries one source payload from its start.
// Addresses and ports are static inputs, as in the document. Header details
// not in the document are the usual IPv4/UDP values.
module udp_tx #(
  parameter int TX_BYTES = 132
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] own_mac,
  input  logic [47:0] dst_mac,
  input  logic        dst_valid,
  input  logic [31:0] own_ip,
  input  logic [31:0] dst_ip,
  input  logic [15:0] src_port,
  input  logic [15:0] dst_port,
  input  logic [31:0] pkt_data,
  input  logic        pkt_vld,
  input  logic        tx_en,
  output logic        busy,
  output logic [15:0] drops,
  output logic [15:0] frames,
  // to the TX bridge
  output logic        tx_req,
  output logic [7:0]  tx_data,
  output logic        tx_last,
  input  logic        tx_ack
);
  localparam int NW    = (TX_BYTES + 3) / 4;
  localparam int FLEN  = 42 + TX_BYTES;
  localparam int WW    = $clog2(NW + 1);
  localparam logic [15:0] IP_LEN  = 16'(28 + TX_BYTES);
  localparam logic [15:0] UDP_LEN = 16'(8 + TX_BYTES);

  logic [31:0] pbuf [NW];
  logic [WW-1:0] wcnt;
  logic [10:0] fidx;
  logic [15:0] ip_id;
  logic [19:0] csum_acc;
  logic [15:0] csum;

  // IPv4 header checksum: ones' complement of the ones' complement sum
  always_comb begin
    csum_acc = 20'h04500 + 20'(IP_LEN) + 20'(ip_id) + 20'h04000 + 20'h04011 +
               20'(own_ip[31:16]) + 20'(own_ip[15:0]) + 20'(dst_ip[31:16]) + 20'(dst_ip[15:0]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum     = ~csum_acc[15:0];
  end

  // ipos is the word's position in the source's packet (every pkt_vld word
  // counts, kept or not); a word is kept only when it lands at the same
  // position of the payload buffer, so a packet that arrives while the buffer
  // is busy or full is dropped whole and the next one starts aligned.
  logic [WW-1:0] ipos;
  logic          take;
  assign take = pkt_vld && !busy && wcnt != WW'(NW) && wcnt == ipos;

  always_ff @(posedge clk) begin
    if (take) pbuf[wcnt] <= pkt_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt <= '0; ipos <= '0; fidx <= '0; ip_id <= '0; busy <= 1'b0; drops <= '0; frames <= '0;
    end else begin
      if (pkt_vld) begin
        ipos <= (ipos == WW'(NW - 1)) ? '0 : ipos + 1'b1;
        if (take) wcnt  <= wcnt + 1'b1;
        else      drops <= drops + 1'b1;
      end
      if (!busy) begin
        if (wcnt == WW'(NW) && tx_en && dst_valid) begin
          busy <= 1'b1;
          fidx <= '0;
        end
      end else if (tx_ack) begin
        fidx <= fidx + 1'b1;
        if (fidx == 11'(FLEN - 1)) begin
          busy   <= 1'b0;
          wcnt   <= '0;
          ip_id  <= ip_id + 1'b1;
          frames <= frames + 1'b1;
        end
      end
    end
  end

  always_comb begin
    logic [10:0] p;
    p = fidx - 11'd42;
    tx_data = 8'h00;
    unique case (fidx) inside
      [11'd0:11'd5]:   tx_data = dst_mac[8*(5 - fidx) +: 8];
      [11'd6:11'd11]:  tx_data = own_mac[8*(11 - fidx) +: 8];
      11'd12:          tx_data = 8'h08;
      11'd14:          tx_data = 8'h45;
      11'd16:          tx_data = IP_LEN[15:8];
      11'd17:          tx_data = IP_LEN[7:0];
      11'd18:          tx_data = ip_id[15:8];
      11'd19:          tx_data = ip_id[7:0];
      11'd20:          tx_data = 8'h40;
      11'd22:          tx_data = 8'h40;
      11'd23:          tx_data = 8'h11;
      11'd24:          tx_data = csum[15:8];
      11'd25:          tx_data = csum[7:0];
      [11'd26:11'd29]: tx_data = own_ip[8*(29 - fidx) +: 8];
      [11'd30:11'd33]: tx_data = dst_ip[8*(33 - fidx) +: 8];
      11'd34:          tx_data = src_port[15:8];
      11'd35:          tx_data = src_port[7:0];
      11'd36:          tx_data = dst_port[15:8];
      11'd37:          tx_data = dst_port[7:0];
      11'd38:          tx_data = UDP_LEN[15:8];
      11'd39:          tx_data = UDP_LEN[7:0];
      [11'd42:11'd2047]: tx_data = pbuf[p[10:2]][8*(3 - p[1:0]) +: 8];
      default:         tx_data = 8'h00;
    endcase
  end
  assign tx_req  = busy;
  assign tx_last = (fidx == 11'(FLEN - 1));
endmodule
