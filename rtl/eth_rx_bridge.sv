// eth_rx_bridge: RX bridge between the Ethernet MAC's receive stream and the
// protocol blocks (ARP, UDP_RX). It registers the byte stream, numbers the
// bytes of each frame (idx, 0 = first destination-MAC byte; preamble and FCS
// are stripped by the MAC) and classifies the frame from its EtherType
// (bytes 12-13): is_arp for 0x0806, is_ip for 0x0800. The flags are valid
// from byte 14 on and hold until the next frame starts. last marks the final
// byte. The consumers read the fields they need by index.
// The byte-wide stream with sop/eop and no back-pressure stands in for the
// MAC's user interface (an assumption: the document does not give it).
module eth_rx_bridge (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  mac_rx_data,
  input  logic        mac_rx_valid,
  input  logic        mac_rx_sop,
  input  logic        mac_rx_eop,
  output logic [7:0]  data,
  output logic        valid,
  output logic        last,
  output logic [10:0] idx,
  output logic        is_arp,
  output logic        is_ip
);
  logic [10:0] cnt;
  logic [7:0]  type_hi;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; data <= '0; valid <= 1'b0; last <= 1'b0; idx <= '0;
      is_arp <= 1'b0; is_ip <= 1'b0; type_hi <= '0;
    end else begin
      valid <= mac_rx_valid;
      if (mac_rx_valid) begin
        data <= mac_rx_data;
        last <= mac_rx_eop;
        idx  <= mac_rx_sop ? '0 : cnt;
        cnt  <= mac_rx_sop ? 11'd1 : cnt + 1'b1;
        if (mac_rx_sop) begin
          is_arp <= 1'b0; is_ip <= 1'b0;
        end
        if (!mac_rx_sop && cnt == 11'd12) type_hi <= mac_rx_data;
        if (!mac_rx_sop && cnt == 11'd13) begin
          is_arp <= ({type_hi, mac_rx_data} == 16'h0806);
          is_ip  <= ({type_hi, mac_rx_data} == 16'h0800);
        end
      end
    end
  end
endmodule
