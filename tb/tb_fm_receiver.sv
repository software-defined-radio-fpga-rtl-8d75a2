// tb_fm_receiver: end-to-end test of the FM receiver chain at reduced size
// (CIC R=8 with 3 stages, 8-sample packets, 3000-clock ARP retry).
// An ADC model drives a tone into channel A of the FMC150 bus; a MAC model
// takes the Ethernet frames and a remote-host model answers the ARP request.
// Every UDP payload must be one whole packet of PACKET_SAMPLES consecutive
// DDC outputs {I, Q} as seen at the DDC, aligned on a packet boundary and
// later than the previous frame's (no sample lost, duplicated or reordered
// across the clock domains; packets completed while the transmitter is
// stalled are dropped whole - a full payload buffer waits for the
// transmitter and the words arriving meanwhile are counted as drops),
// DDC outputs must come every R ADC clocks, and packet,
// frame, overrun and drop counters must agree with what was observed.
// Mechanisms that must each happen at least once: ARP request, ARP
// resolution, DDC output, double-buffer packet, UDP frame, a transmit stall
// (udp_tx_rdy low) with dropped words, an SPI transfer and a DAC frame.
module tb_fm_receiver;
  logic adc_clkout = 0, sys_clk = 0, clk_fast = 0, ext_rst = 1;
  always #4.069 adc_clkout = ~adc_clkout;   // 122.88 MHz
  always #4 sys_clk = ~sys_clk;             // 125 MHz
  always #2.0345 clk_fast = ~clk_fast;      // 245.76 MHz
  int checks = 0, failures = 0;

  localparam int R = 8, NS = 8;
  localparam logic [47:0] OWN_MAC = 48'h02_00_00_00_00_01;
  localparam logic [47:0] DST_MAC = 48'h00_1B_21_AA_BB_CC;
  localparam logic [31:0] OWN_IP  = 32'hC0A8_0102;
  localparam logic [31:0] DST_IP  = 32'hC0A8_0101;

  logic [13:0] adc_data;
  logic [15:0] dac_chc_din, dac_chd_din;
  logic [7:0] dac_data, mtd, mrd;
  logic dac_dclk, dac_frame;
  logic spi_start, spi_busy, spi_done, spi_sclk, spi_mosi, spi_miso;
  logic [1:0] spi_dev;
  logic [5:0] spi_nbits;
  logic [31:0] spi_wdata, spi_rdata, ftw, rx_w;
  logic [2:0] spi_cs_n;
  logic udp_tx_rdy, mac_init_done, rx_req, rx_rdy;
  logic [47:0] dst_mac;
  logic mtv, mts, mte, mtr, mrv, mrs, mre;
  logic ddc_vld;
  logic [15:0] ddc_i, ddc_q, packets, overruns, frames, drops;

  fm_receiver #(.SAMPLE_RATE_CHANGE1(R), .NUMBER_OF_STAGES1(3), .PACKET_SAMPLES(NS),
                .ARP_RETRY_CYCLES(3000)) dut (
    .ext_rst, .adc_clkout, .adc_data, .clk_fast, .dac_chc_din, .dac_chd_din, .dac_data, .dac_dclk,
    .dac_frame, .spi_start, .spi_dev, .spi_nbits, .spi_wdata, .spi_busy, .spi_done, .spi_rdata,
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n, .ftw, .sys_clk, .own_mac_addr(OWN_MAC),
    .own_ip_addr(OWN_IP), .dst_ip_addr(DST_IP), .udp_src_port(16'd5000), .udp_dst_port(16'd6000),
    .udp_tx_rdy, .mac_init_done, .dst_mac_addr(dst_mac), .udp_rx_pkt_req(rx_req), .udp_rx_rdy(rx_rdy),
    .udp_rx_pkt_data(rx_w), .mac_tx_data(mtd), .mac_tx_valid(mtv), .mac_tx_sop(mts), .mac_tx_eop(mte),
    .mac_tx_ready(mtr), .mac_rx_data(mrd), .mac_rx_valid(mrv), .mac_rx_sop(mrs), .mac_rx_eop(mre),
    .ddc_vld, .ddc_i, .ddc_q, .packets, .overruns, .udp_frames(frames), .udp_drops(drops));

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC model: tone on channel A, noise on B ----------------
  real ph = 0.0;
  initial begin
    adc_data = 0;
    forever begin
      @(negedge adc_clkout); #1 adc_data = 14'($rtoi($floor(6000.0 * $cos(ph) + 0.5)));
      ph = ph + 2.0 * 3.141592653589793 * 0.1237;
      if (ph > 6.283185307179586) ph = ph - 6.283185307179586;
      @(posedge adc_clkout); #1 adc_data = 14'($urandom);
    end
  end

  // ---------------- DDC output record and rate check ----------------
  logic [31:0] ddc_hist [$];
  int adc_cyc = 0, last_vld = -1, n_ddc = 0;
  always @(posedge adc_clkout) begin
    adc_cyc++;
    if (ddc_vld) begin
      ddc_hist.push_back({ddc_i, ddc_q});
      n_ddc++;
      if (last_vld >= 0) begin
        checks++;
        if (adc_cyc - last_vld != R) begin failures++; $display("DDC output spacing %0d", adc_cyc - last_vld); end
      end
      last_vld = adc_cyc;
    end
  end

  // ---------------- MAC model ----------------
  typedef byte unsigned frame_t [$];
  frame_t cur;
  int n_arp_req = 0, n_udp = 0, n_match = 0, n_stall = 0, last_j = -1, n_skipped = 0;
  assign mtr = 1'b1;
  always @(posedge sys_clk) begin
    if (!ext_rst && mtv && mtr) begin
      if (mts) cur = {};
      cur.push_back(mtd);
      if (mte) begin
        if (cur.size() >= 14 && {cur[12], cur[13]} == 16'h0806) n_arp_req++;
        else if (cur.size() == 42 + 4 * NS && {cur[12], cur[13]} == 16'h0800) begin
          n_udp++;
          // the payload must be packet j (DDC outputs j*NS .. j*NS+NS-1) for
          // some j later than the previous frame's
          checks++;
          begin
            automatic int found = -1;
            for (int j = last_j + 1; (j + 1) * NS <= ddc_hist.size() && found < 0; j++) begin
              automatic bit same = 1;
              for (int k = 0; k < NS; k++)
                if ({cur[42+4*k], cur[43+4*k], cur[44+4*k], cur[45+4*k]} != ddc_hist[j*NS+k]) same = 0;
              if (same) found = j;
            end
            if (found < 0) begin
              failures++; $display("frame %0d is no DDC packet after packet %0d", n_udp, last_j);
            end else begin
              n_match++;
              if (found != last_j + 1) n_skipped += found - last_j - 1;
              last_j = found;
            end
          end
        end else begin
          checks++; failures++; $display("unexpected frame of %0d bytes", cur.size());
        end
      end
    end
  end

  task automatic send_rx(input frame_t f);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge sys_clk);
      mrv = 1; mrd = f[i]; mrs = (i == 0); mre = (i == f.size() - 1);
    end
    @(negedge sys_clk);
    mrv = 0; mrs = 0; mre = 0;
  endtask

  function automatic frame_t arp_reply();
    frame_t f;
    for (int i = 5; i >= 0; i--) f.push_back(OWN_MAC[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(DST_MAC[i*8 +: 8]);
    f.push_back(8'h08); f.push_back(8'h06);
    f.push_back(0); f.push_back(1); f.push_back(8'h08); f.push_back(0); f.push_back(6); f.push_back(4);
    f.push_back(0); f.push_back(2);
    for (int i = 5; i >= 0; i--) f.push_back(DST_MAC[i*8 +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(DST_IP[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(OWN_MAC[i*8 +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(OWN_IP[i*8 +: 8]);
    for (int i = 0; i < 18; i++) f.push_back(0);
    return f;
  endfunction

  // ---------------- DAC frames ----------------
  int n_dac = 0;
  always @(posedge clk_fast) if (dac_frame) n_dac++;

  // ---------------- SPI: loop MISO back to MOSI ----------------
  assign spi_miso = spi_mosi;

  initial begin
    int n_spi = 0, d0;
    ftw = 32'($rtoi(0.12 * 4294967296.0));
    dac_chc_din = 16'h1234; dac_chd_din = 16'h5678;
    spi_start = 0; spi_dev = 0; spi_nbits = 0; spi_wdata = 0;
    udp_tx_rdy = 0; rx_req = 0; mrv = 0; mrd = 0; mrs = 0; mre = 0;
    #100 ext_rst = 0;
    // the first ARP request goes out after reset; answer it
    wait (n_arp_req > 0);
    repeat (20) @(posedge sys_clk);
    send_rx(arp_reply());
    repeat (5) @(posedge sys_clk);
    checks++;
    if (!mac_init_done || dst_mac != DST_MAC) begin failures++; $display("ARP not resolved"); end
    udp_tx_rdy = 1;
    // SPI transfer
    @(negedge sys_clk) begin spi_start = 1; spi_dev = 2'd1; spi_nbits = 6'd16; spi_wdata = 32'h0000_BEEF; end
    @(negedge sys_clk) spi_start = 0;
    wait (spi_done);
    @(posedge sys_clk); #1;
    checks++;
    if (spi_rdata[15:0] != 16'hBEEF) begin failures++; $display("SPI loopback %h", spi_rdata); end
    else n_spi++;
    // run, then stall the transmitter for a while, then run again
    wait (n_udp >= 3);
    d0 = int'(drops);
    @(posedge sys_clk); #1 udp_tx_rdy = 0;
    repeat (R * NS * 3) @(posedge adc_clkout);
    checks++;
    if (int'(drops) == d0) begin failures++; $display("stall did not drop any word"); end
    else n_stall++;
    udp_tx_rdy = 1;
    d0 = n_udp;
    wait (n_udp >= d0 + 3);
    repeat (10) @(posedge sys_clk);
    // mechanism counts
    checks += 9;
    if (n_arp_req == 0) begin failures++; $display("no ARP request"); end
    if (!mac_init_done) begin failures++; $display("no ARP resolution"); end
    if (n_ddc == 0) begin failures++; $display("no DDC output"); end
    if (packets == 0) begin failures++; $display("no packet"); end
    if (n_udp < 6 || int'(frames) != n_udp) begin failures++; $display("frames %0d seen %0d", frames, n_udp); end
    if (n_stall == 0 || n_skipped == 0) begin failures++; $display("no stall or no packet dropped by it"); end
    if (n_spi == 0) begin failures++; $display("no SPI transfer"); end
    if (n_dac == 0) begin failures++; $display("no DAC frame"); end
    if (overruns != 0) begin failures++; $display("%0d overruns", overruns); end
    $display("ARP requests %0d, DDC outputs %0d, packets %0d, UDP frames %0d (%0d matched DDC packets, %0d packets skipped), drops %0d, stalls %0d, SPI %0d, DAC frames %0d",
             n_arp_req, n_ddc, packets, n_udp, n_match, n_skipped, drops, n_stall, n_spi, n_dac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
