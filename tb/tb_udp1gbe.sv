// tb_udp1gbe: self-checking test of the UDP/IP core against a model of the
// MAC client stream and of a remote host.
// The core is built with 16-byte TX/RX payloads and a 3000-clock ARP retry.
// The MAC model accepts bytes with random back-pressure (mac_tx_ready) and
// collects whole frames between sop and eop. The test checks:
//   - an ARP request for the destination IP right after reset, and a second
//     one RETRY clocks after the first has gone out (its start follows
//     by RETRY plus the frame time) while no reply has come;
//   - that an ARP reply from the destination sets mac_init_done and
//     dst_mac_addr;
//   - that an ARP request for the core's own IP is answered correctly;
//   - a UDP datagram after four words are written: Ethernet header, IPv4
//     header fields and checksum, UDP header and the payload bytes in order;
//   - that words written while a datagram is being sent are counted as drops;
//   - reception: a datagram for the core's IP and port raises udp_rx_rdy and
//     its payload is read back word by word (data one clock after the
//     request); datagrams for another port or IP are ignored.
module tb_udp1gbe;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [47:0] OWN_MAC = 48'h02_00_00_00_00_01;
  localparam logic [47:0] DST_MAC = 48'h00_1B_21_AA_BB_CC;
  localparam logic [31:0] OWN_IP  = 32'hC0A8_0102;   // 192.168.1.2
  localparam logic [31:0] DST_IP  = 32'hC0A8_0101;   // 192.168.1.1
  localparam int RETRY = 3000;

  logic [47:0] dst_mac_addr;
  logic mac_init_done, udp_tx_busy, udp_rx_rdy;
  logic [31:0] tx_w, rx_w;
  logic tx_v, tx_rdy, rx_req;
  logic [15:0] frames, drops;
  logic [7:0] mtd, mrd;
  logic mtv, mts, mte, mtr, mrv, mrs, mre;

  udp1gbe #(.UDP_TX_DATA_BYTE_LENGTH(16), .UDP_RX_DATA_BYTE_LENGTH(16), .ARP_RETRY_CYCLES(RETRY)) dut (
    .sys_clk(clk), .sys_rst(rst), .own_mac_addr(OWN_MAC), .own_ip_addr(OWN_IP), .dst_ip_addr(DST_IP),
    .dst_mac_addr, .udp_src_port(16'd5000), .udp_dst_port(16'd6000), .mac_init_done,
    .udp_tx_pkt_data(tx_w), .udp_tx_pkt_vld(tx_v), .udp_tx_rdy(tx_rdy), .udp_tx_busy,
    .udp_tx_frames(frames), .udp_tx_drops(drops),
    .udp_rx_pkt_req(rx_req), .udp_rx_rdy, .udp_rx_pkt_data(rx_w),
    .mac_tx_data(mtd), .mac_tx_valid(mtv), .mac_tx_sop(mts), .mac_tx_eop(mte), .mac_tx_ready(mtr),
    .mac_rx_data(mrd), .mac_rx_valid(mrv), .mac_rx_sop(mrs), .mac_rx_eop(mre));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- MAC transmit model ----------------
  typedef byte unsigned frame_t [$];
  frame_t cur, got [$];
  int frame_t0 [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) mtr <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (!rst && mtv && mtr) begin
      if (mts) begin
        cur = {};
        frame_t0.push_back(cyc);
      end
      cur.push_back(mtd);
      if (mte) got.push_back(cur);
    end
  end

  function automatic logic [47:0] f48(frame_t f, int i);
    return {f[i], f[i+1], f[i+2], f[i+3], f[i+4], f[i+5]};
  endfunction
  function automatic logic [31:0] f32(frame_t f, int i);
    return {f[i], f[i+1], f[i+2], f[i+3]};
  endfunction
  function automatic logic [15:0] f16(frame_t f, int i);
    return {f[i], f[i+1]};
  endfunction

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_frame(output frame_t f);
    int n = 0;
    while (got.size() == 0 && n < 20000) begin @(posedge clk); n++; end
    if (got.size() == 0) begin f = {}; expect_true(0, "no frame sent"); end
    else f = got.pop_front();
  endtask

  task automatic check_arp(input frame_t f, input int op, input logic [47:0] eth_dst,
                           input logic [47:0] tha, input logic [31:0] tpa);
    expect_true(f.size() == 42, "ARP frame length");
    if (f.size() != 42) return;
    expect_true(f48(f, 0) == eth_dst && f48(f, 6) == OWN_MAC && f16(f, 12) == 16'h0806, "ARP Ethernet header");
    expect_true(f16(f, 14) == 1 && f16(f, 16) == 16'h0800 && f[18] == 6 && f[19] == 4, "ARP hardware/protocol fields");
    expect_true(f16(f, 20) == 16'(op), "ARP operation");
    expect_true(f48(f, 22) == OWN_MAC && f32(f, 28) == OWN_IP, "ARP sender");
    expect_true(f48(f, 32) == tha && f32(f, 38) == tpa, "ARP target");
  endtask

  // ---------------- MAC receive model ----------------
  task automatic send_rx(input frame_t f);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk);
      mrv = 1; mrd = f[i]; mrs = (i == 0); mre = (i == f.size() - 1);
    end
    @(negedge clk);
    mrv = 0; mrs = 0; mre = 0;
    repeat (3) @(posedge clk);
  endtask

  function automatic frame_t arp_frame(input int op, input logic [47:0] sha, input logic [31:0] spa,
                                       input logic [47:0] tha, input logic [31:0] tpa, input logic [47:0] eth_dst);
    frame_t f;
    for (int i = 5; i >= 0; i--) f.push_back(eth_dst[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(sha[i*8 +: 8]);
    f.push_back(8'h08); f.push_back(8'h06);
    f.push_back(0); f.push_back(1); f.push_back(8'h08); f.push_back(0); f.push_back(6); f.push_back(4);
    f.push_back(0); f.push_back(8'(op));
    for (int i = 5; i >= 0; i--) f.push_back(sha[i*8 +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(spa[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(tha[i*8 +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(tpa[i*8 +: 8]);
    for (int i = 0; i < 18; i++) f.push_back(0);   // padding to 60 bytes
    return f;
  endfunction

  function automatic frame_t udp_frame(input logic [31:0] dip, input logic [15:0] dport, input byte unsigned pl [16]);
    frame_t f;
    for (int i = 5; i >= 0; i--) f.push_back(OWN_MAC[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(DST_MAC[i*8 +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(0); f.push_back(0); f.push_back(20 + 8 + 16);
    f.push_back(0); f.push_back(1); f.push_back(8'h40); f.push_back(0); f.push_back(64); f.push_back(17);
    f.push_back(0); f.push_back(0);                    // checksum not checked by the receiver
    for (int i = 3; i >= 0; i--) f.push_back(DST_IP[i*8 +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(dip[i*8 +: 8]);
    f.push_back(8'h17); f.push_back(8'h70);           // source port 6000
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(0); f.push_back(8 + 16); f.push_back(0); f.push_back(0);
    for (int i = 0; i < 16; i++) f.push_back(pl[i]);
    return f;
  endfunction

  initial begin
    frame_t f;
    byte unsigned pl [16];
    logic [31:0] words [4];
    int t_first, sum;
    tx_w = 0; tx_v = 0; tx_rdy = 0; rx_req = 0; mrv = 0; mrd = 0; mrs = 0; mre = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    // ---- ARP request after reset and its retry ----
    wait_frame(f);
    check_arp(f, 1, 48'hFFFF_FFFF_FFFF, 48'h0, DST_IP);
    t_first = frame_t0[0];
    wait_frame(f);
    check_arp(f, 1, 48'hFFFF_FFFF_FFFF, 48'h0, DST_IP);
    $display("ARP retry after %0d clocks", frame_t0[1] - t_first);
    expect_true(frame_t0[1] - t_first >= RETRY && frame_t0[1] - t_first <= RETRY + 100, "ARP retry interval");
    expect_true(!mac_init_done, "resolved without a reply");
    // ---- reply from the destination ----
    send_rx(arp_frame(2, DST_MAC, DST_IP, OWN_MAC, OWN_IP, OWN_MAC));
    expect_true(mac_init_done && dst_mac_addr == DST_MAC, "ARP reply resolves the destination MAC");
    // ---- request from another host for our address ----
    send_rx(arp_frame(1, 48'h0A0B0C0D0E0F, 32'hC0A8_0107, 48'h0, OWN_IP, 48'hFFFF_FFFF_FFFF));
    wait_frame(f);
    check_arp(f, 2, 48'h0A0B0C0D0E0F, 48'h0A0B0C0D0E0F, 32'hC0A8_0107);
    // ---- UDP transmit ----
    tx_rdy = 1;
    for (int k = 0; k < 4; k++) begin
      words[k] = $urandom;
      @(negedge clk) begin tx_v = 1; tx_w = words[k]; end
    end
    @(negedge clk) tx_v = 0;
    @(negedge clk);
    expect_true(udp_tx_busy, "busy while sending");
    @(negedge clk) begin tx_v = 1; tx_w = 32'hDEAD_BEEF; end
    @(negedge clk) tx_v = 0;
    wait_frame(f);
    expect_true(f.size() == 14 + 20 + 8 + 16, "UDP frame length");
    if (f.size() == 58) begin
      expect_true(f48(f, 0) == DST_MAC && f48(f, 6) == OWN_MAC && f16(f, 12) == 16'h0800, "UDP Ethernet header");
      expect_true(f[14] == 8'h45 && f16(f, 16) == 44 && f[22] == 64 && f[23] == 17, "IPv4 version/length/TTL/protocol");
      expect_true(f16(f, 20) == 16'h4000, "IPv4 flags (DF)");
      expect_true(f32(f, 26) == OWN_IP && f32(f, 30) == DST_IP, "IPv4 addresses");
      sum = 0;
      for (int i = 14; i < 34; i += 2) sum += int'(f16(f, i));
      while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
      expect_true(sum == 16'hFFFF, "IPv4 header checksum");
      expect_true(f16(f, 34) == 5000 && f16(f, 36) == 6000 && f16(f, 38) == 24 && f16(f, 40) == 0, "UDP header");
      for (int k = 0; k < 4; k++) expect_true(f32(f, 42 + 4 * k) == words[k], "UDP payload word");
    end
    repeat (5) @(posedge clk);
    expect_true(frames == 1 && drops == 1, "frame and drop counters");
    // ---- UDP receive ----
    for (int i = 0; i < 16; i++) pl[i] = 8'($urandom);
    send_rx(udp_frame(OWN_IP, 16'd6000, pl));            // wrong port (our port is 5000)
    expect_true(!udp_rx_rdy, "datagram for another port ignored");
    send_rx(udp_frame(32'hC0A8_0109, 16'd5000, pl));     // other IP
    expect_true(!udp_rx_rdy, "datagram for another IP ignored");
    send_rx(udp_frame(OWN_IP, 16'd5000, pl));
    expect_true(udp_rx_rdy, "datagram for us accepted");
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) rx_req = 1;
      @(negedge clk) rx_req = 0;
      expect_true(rx_w == {pl[4*k], pl[4*k+1], pl[4*k+2], pl[4*k+3]}, "received payload word");
    end
    repeat (2) @(posedge clk);
    expect_true(!udp_rx_rdy, "rx_rdy falls after the last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
