// tb_sdr_top: end-to-end test of the whole design at its default size (no
// parameter is overridden), so it also serves as the full-size run.
// Two parts run side by side:
//  FM receiver - an ADC model drives a tone into the FMC150 bus at 122.88 MHz,
//  a MAC model collects Ethernet frames and a remote-host model answers the
//  ARP request. Each 132-byte UDP payload must be one whole packet of 33
//  consecutive DDC outputs {I, Q} (checked against the DDC outputs recorded
//  here), DDC outputs must come every 128 ADC clocks (960 kSPS), and a
//  transmit stall must drop whole packets. An SPI transfer (MISO looped to
//  MOSI) and the DAC byte stream are exercised too.
//  Wishbone cores - a bus master reaches the three IP cores:
//   FIR: an impulse through the built-in 21-tap filter must return the taps;
//        70 samples sent without reading must stall the core on its output
//        FIFO (samples left waiting in the input FIFO); new taps written to the coefficient
//        register must replace the built-in ones.
//   IIR: the core must report not ready until its 30 coefficients are in;
//        with section 0 = 1/(1 - 0.5 z^-1) and the other five sections unity,
//        an impulse must give a halving sequence.
//   FFT: a 1024-point frame with an impulse at n = 1 must give
//        X[k] = A*exp(-j*2*pi*k/1024) (outputs in bit-reversed order); after
//        a soft reset with the mode bit set, the same frame must give the
//        conjugate (inverse transform).
//   Unmapped slot 3 must acknowledge with 0.
// Every mechanism is counted; one that never happened is a failure.
module tb_sdr_top;
  import sdr_pkg::*;
  logic wb_clk = 0, adc_clkout = 0, sys_clk = 0, clk_fast = 0;
  logic wb_rst_in = 1, ext_rst = 1;
  always #5 wb_clk = ~wb_clk;               // 100 MHz
  always #4.069 adc_clkout = ~adc_clkout;   // 122.88 MHz
  always #4 sys_clk = ~sys_clk;             // 125 MHz
  always #2.0345 clk_fast = ~clk_fast;      // 245.76 MHz
  int checks = 0, failures = 0;

  localparam int R = 128, NS = 33;
  localparam logic [47:0] OWN_MAC = 48'h02_00_00_00_00_01;
  localparam logic [47:0] DST_MAC = 48'h00_1B_21_AA_BB_CC;
  localparam logic [31:0] OWN_IP  = 32'hC0A8_0102;
  localparam logic [31:0] DST_IP  = 32'hC0A8_0101;

  logic [4:0]  wb_adr_i;
  logic [31:0] wb_dat_i, wb_dat_o;
  logic wb_we_i, wb_stb_i, wb_cyc_i, wb_ack_o;
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

  sdr_top dut (
    .wb_clk, .wb_rst_in, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_we_i, .wb_stb_i, .wb_cyc_i, .wb_ack_o,
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
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_arp_req = 0, n_arp_res = 0, n_ddc = 0, n_udp = 0, n_stall = 0, n_spi = 0, n_dac = 0;
  int n_fir_imp = 0, n_fir_full = 0, n_fir_reload = 0, n_iir_wait = 0, n_iir_out = 0;
  int n_fft_fwd = 0, n_fft_inv = 0, n_unmapped = 0;
  bit fm_done = 0, wb_done = 0;

  // =================== FM receiver part ===================
  real ph = 0.0;
  initial begin
    adc_data = 0;
    forever begin
      @(negedge adc_clkout); #1 adc_data = 14'($rtoi($floor(6000.0 * $cos(ph) + 0.5)));
      ph = ph + 2.0 * 3.141592653589793 * (0.1200 + 30.0e3 / 122.88e6);
      if (ph > 6.283185307179586) ph = ph - 6.283185307179586;
      @(posedge adc_clkout); #1 adc_data = 14'($urandom);
    end
  end

  logic [31:0] ddc_hist [$];
  int adc_cyc = 0, last_vld = -1;
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

  typedef byte unsigned frame_t [$];
  frame_t cur;
  int last_j = -1, n_skipped = 0;
  assign mtr = 1'b1;
  always @(posedge sys_clk) begin
    if (!ext_rst && mtv && mtr) begin
      if (mts) cur = {};
      cur.push_back(mtd);
      if (mte) begin
        if (cur.size() >= 14 && {cur[12], cur[13]} == 16'h0806) n_arp_req++;
        else if (cur.size() == 42 + 4 * NS && {cur[12], cur[13]} == 16'h0800) begin
          automatic int found = -1;
          n_udp++;
          checks++;
          for (int j = last_j + 1; (j + 1) * NS <= ddc_hist.size() && found < 0; j++) begin
            automatic bit same = 1;
            for (int k = 0; k < NS; k++)
              if ({cur[42+4*k], cur[43+4*k], cur[44+4*k], cur[45+4*k]} != ddc_hist[j*NS+k]) same = 0;
            if (same) found = j;
          end
          if (found < 0) begin
            failures++; $display("UDP frame %0d is no DDC packet after packet %0d", n_udp, last_j);
          end else begin
            n_skipped += found - last_j - 1;
            last_j = found;
          end
        end else begin
          checks++; failures++; $display("unexpected frame of %0d bytes", cur.size());
        end
      end
    end
  end

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

  always @(posedge clk_fast) if (dac_frame) n_dac++;
  assign spi_miso = spi_mosi;

  initial begin
    frame_t f;
    int d0;
    ftw = 32'($rtoi(0.12 * 4294967296.0));
    dac_chc_din = 16'h1234; dac_chd_din = 16'h5678;
    spi_start = 0; spi_dev = 0; spi_nbits = 0; spi_wdata = 0;
    udp_tx_rdy = 0; rx_req = 0; mrv = 0; mrd = 0; mrs = 0; mre = 0;
    #100 ext_rst = 0;
    wait (n_arp_req > 0);
    repeat (20) @(posedge sys_clk);
    f = arp_reply();
    for (int i = 0; i < f.size(); i++) begin
      @(negedge sys_clk);
      mrv = 1; mrd = f[i]; mrs = (i == 0); mre = (i == f.size() - 1);
    end
    @(negedge sys_clk) begin mrv = 0; mrs = 0; mre = 0; end
    repeat (5) @(posedge sys_clk);
    checks++;
    if (!mac_init_done || dst_mac != DST_MAC) begin failures++; $display("ARP not resolved"); end
    else n_arp_res++;
    udp_tx_rdy = 1;
    @(negedge sys_clk) begin spi_start = 1; spi_dev = 2'd0; spi_nbits = 6'd32; spi_wdata = 32'h6801_02C0; end
    @(negedge sys_clk) spi_start = 0;
    wait (spi_done);
    @(posedge sys_clk); #1;
    checks++;
    if (spi_rdata != 32'h6801_02C0) begin failures++; $display("SPI loopback %h", spi_rdata); end
    else n_spi++;
    wait (n_udp >= 2);
    d0 = int'(drops);
    @(posedge sys_clk); #1 udp_tx_rdy = 0;
    repeat (R * NS * 2 + 200) @(posedge adc_clkout);
    checks++;
    if (int'(drops) == d0) begin failures++; $display("stall dropped nothing"); end
    else n_stall++;
    udp_tx_rdy = 1;
    d0 = n_udp;
    wait (n_udp >= d0 + 2);
    repeat (10) @(posedge sys_clk);
    checks += 2;
    if (int'(frames) != n_udp) begin failures++; $display("frame counter %0d, seen %0d", frames, n_udp); end
    if (overruns != 0) begin failures++; $display("%0d double-buffer overruns", overruns); end
    $display("FM receiver: ARP requests %0d, DDC outputs %0d, packets %0d, UDP frames %0d, packets dropped in stall %0d, word drops %0d",
             n_arp_req, n_ddc, packets, n_udp, n_skipped, drops);
    fm_done = 1;
  end

  // =================== Wishbone part ===================
  task automatic bus(input logic we, input logic [1:0] slot, input logic [2:0] adr,
                     input logic [31:0] wd, output logic [31:0] rd);
    int n = 0;
    @(negedge wb_clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = {slot, adr}; wb_dat_i = wd;
    do begin @(posedge wb_clk); #1; n++; end while (!wb_ack_o && n < 10);
    checks++;
    if (n != 1) begin failures++; $display("ACK after %0d clocks (slot %0d)", n, slot); end
    rd = wb_dat_o;
    @(posedge wb_clk); #1;
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
  endtask

  task automatic wr(input logic [1:0] slot, input logic [2:0] adr, input logic [31:0] d);
    logic [31:0] x;
    bus(1'b1, slot, adr, d, x);
  endtask

  task automatic rd(input logic [1:0] slot, input logic [2:0] adr, output logic [31:0] d);
    bus(1'b0, slot, adr, 32'd0, d);
  endtask

  // read n output words from a core, waiting for them
  task automatic collect(input logic [1:0] slot, input int n, ref int q [$]);
    logic [31:0] s, d;
    wb_status_t st;
    int tries = 0;
    // a core that never answers must not hang the run: give up after 3000 polls
    while (n > 0 && tries < 3000) begin
      rd(slot, WB_STATUS, s);
      st = wb_status_t'(s);
      for (int k = 0; k < int'(st.tx_count) && n > 0; k++) begin
        rd(slot, WB_OUTPUT, d);
        q.push_back(int'(d));
        n--;
      end
      tries++;
    end
  endtask

  function automatic int brev10(input int v);
    int r = 0;
    for (int i = 0; i < 10; i++) if (v & (1 << i)) r |= 1 << (9 - i);
    return r;
  endfunction

  task automatic fft_frame(input bit inverse, input int A);
    int q [$];
    logic [31:0] s;
    wb_status_t st;
    int bad = 0;
    real ang, er, ei;
    wr(2'd2, WB_CONTROL, 32'h2);                       // soft reset
    // bin 0 of the flushing zero frame of a previous run may still sit in the
    // output FIFO (it leaves the pipeline a few clocks after the frame's last
    // sample): empty the FIFO
    rd(2'd2, WB_STATUS, s);
    st = s;
    for (int g = 0; st.tx_count > 0 && g < 4096; g++) begin
      rd(2'd2, WB_OUTPUT, s);
      rd(2'd2, WB_STATUS, s);
      st = s;
    end
    wr(2'd2, WB_CONTROL, inverse ? 32'h5 : 32'h1);     // enable (+ inverse)
    // frame: impulse at n = 1, then a zero frame to push it out
    for (int n = 0; n < 2048; n++) begin
      wr(2'd2, WB_INPUT, (n == 1) ? 32'(A) : 32'd0);
      if (n % 32 == 31) begin
        rd(2'd2, WB_STATUS, s);
        st = s;
        for (int g = 0; st.tx_count > 16 && g < 4096; g++) begin
          rd(2'd2, WB_OUTPUT, s);
          q.push_back(int'(s));
          rd(2'd2, WB_STATUS, s);
          st = s;
        end
      end
    end
    collect(2'd2, 2048 - q.size(), q);
    for (int m = 0; m < 1024; m++) begin
      automatic int k = brev10(m);
      ang = (inverse ? 2.0 : -2.0) * 3.141592653589793 * k / 1024.0;
      er = A * $cos(ang); ei = A * $sin(ang);
      checks++;
      if (real'(q[2*m]) - er > 4.0 || er - real'(q[2*m]) > 4.0 ||
          real'(q[2*m+1]) - ei > 4.0 || ei - real'(q[2*m+1]) > 4.0) begin
        failures++; bad++;
        if (bad < 5) $display("FFT%s bin %0d: %0d %0d want %f %f", inverse ? " (inverse)" : "", k, q[2*m], q[2*m+1], er, ei);
      end
    end
    if (bad == 0) begin if (inverse) n_fft_inv++; else n_fft_fwd++; end
  endtask

  initial begin
    logic [31:0] s;
    wb_status_t st;
    int q [$];
    int bad;
    wb_adr_i = 0; wb_dat_i = 0; wb_we_i = 0; wb_stb_i = 0; wb_cyc_i = 0;
    repeat (5) @(posedge wb_clk);
    wb_rst_in = 0;
    repeat (5) @(posedge wb_clk);
    // ---- unmapped slot ----
    rd(2'd3, WB_STATUS, s);
    checks++;
    if (s != 0) begin failures++; $display("unmapped slot returned %h", s); end else n_unmapped++;
    // ---- FIR: impulse through the built-in taps ----
    wr(2'd0, WB_CONTROL, 32'h1);
    for (int n = 0; n < 30; n++) wr(2'd0, WB_INPUT, (n == 0) ? 32'd32767 : 32'd0);
    collect(2'd0, 30, q);
    bad = 0;
    for (int n = 0; n < 30; n++) begin
      automatic int want = (n < CFIR_TAPS) ? ((32767 * CFIR_COEFFS[n]) >>> 15) : 0;
      checks++;
      if (q[n] != want) begin bad++; failures++; $display("FIR out %0d: %0d want %0d", n, q[n], want); end
    end
    if (bad == 0) n_fir_imp++;
    q = {};
    // ---- FIR: fill the output FIFO without reading ----
    for (int n = 0; n < 70; n++) wr(2'd0, WB_INPUT, 32'd100);
    repeat (20) @(posedge wb_clk);
    rd(2'd0, WB_STATUS, s);
    checks++;
    st = s;
    // the core stops taking samples while fewer than 16 places are free in
    // its output FIFO: samples must be left waiting in the input FIFO
    if (st.tx_count < 48 || st.rx_empty) begin
      failures++; $display("FIR core not stalled by its output FIFO: %h", s);
    end else n_fir_full++;
    collect(2'd0, 70, q);
    checks++;
    if (q.size() != 70) failures++;
    q = {};
    // ---- FIR: new taps (a single tap of 0.5 at k = 3) ----
    for (int k = 0; k < CFIR_TAPS; k++) wr(2'd0, WB_COEFF, (k == 3) ? 32'd16384 : 32'd0);
    // clear the partial sums made with the old taps
    for (int n = 0; n < 30; n++) wr(2'd0, WB_INPUT, 32'd0);
    collect(2'd0, 30, q);
    q = {};
    for (int n = 0; n < 8; n++) wr(2'd0, WB_INPUT, (n == 0) ? 32'd20000 : 32'd0);
    collect(2'd0, 8, q);
    bad = 0;
    for (int n = 0; n < 8; n++) begin
      checks++;
      if (q[n] != ((n == 3) ? 10000 : 0)) begin bad++; failures++; $display("FIR reload out %0d: %0d", n, q[n]); end
    end
    if (bad == 0) n_fir_reload++;
    q = {};
    // ---- IIR: not ready before coefficients, then a halving sequence ----
    wr(2'd1, WB_CONTROL, 32'h1);
    wr(2'd1, WB_INPUT, 32'd8000);
    repeat (10) @(posedge wb_clk);
    rd(2'd1, WB_STATUS, s);
    checks++;
    st = s;
    if (st.core_rdy || st.tx_count != 0) begin
      failures++; $display("IIR ran without coefficients");
    end else n_iir_wait++;
    for (int sct = 0; sct < 6; sct++) begin
      wr(2'd1, WB_COEFF, 32'd16384);                    // b0 = 1
      wr(2'd1, WB_COEFF, 32'd0);
      wr(2'd1, WB_COEFF, 32'd0);
      wr(2'd1, WB_COEFF, (sct == 0) ? 32'hFFFF_E000 : 32'd0);   // a1 = -0.5
      wr(2'd1, WB_COEFF, 32'd0);
    end
    for (int n = 0; n < 9; n++) wr(2'd1, WB_INPUT, 32'd0);
    collect(2'd1, 10, q);
    bad = 0;
    for (int n = 0; n < 10; n++) begin
      checks++;
      if (q[n] != (8000 >> n)) begin bad++; failures++; $display("IIR out %0d: %0d want %0d", n, q[n], 8000 >> n); end
    end
    if (bad == 0) n_iir_out++;
    q = {};
    // ---- FFT forward, then inverse ----
    fft_frame(1'b0, 1000);
    fft_frame(1'b1, 1000);
    wb_done = 1;
  end

  // =================== summary ===================
  initial begin
    wait (fm_done && wb_done);
    checks += 15;
    if (n_arp_req == 0)    begin failures++; $display("never: ARP request"); end
    if (n_arp_res == 0)    begin failures++; $display("never: ARP resolution"); end
    if (n_ddc == 0)        begin failures++; $display("never: DDC output"); end
    if (n_udp == 0)        begin failures++; $display("never: UDP frame"); end
    if (n_stall == 0 || n_skipped == 0) begin failures++; $display("never: transmit stall"); end
    if (n_spi == 0)        begin failures++; $display("never: SPI transfer"); end
    if (n_dac == 0)        begin failures++; $display("never: DAC frame"); end
    if (n_fir_imp == 0)    begin failures++; $display("never: FIR built-in taps"); end
    if (n_fir_full == 0)   begin failures++; $display("never: FIR output back-pressure"); end
    if (n_fir_reload == 0) begin failures++; $display("never: FIR tap reload"); end
    if (n_iir_wait == 0)   begin failures++; $display("never: IIR wait for coefficients"); end
    if (n_iir_out == 0)    begin failures++; $display("never: IIR recursion"); end
    if (n_fft_fwd == 0)    begin failures++; $display("never: FFT forward"); end
    if (n_fft_inv == 0)    begin failures++; $display("never: FFT inverse"); end
    if (n_unmapped == 0)   begin failures++; $display("never: unmapped access"); end
    $display("mechanisms: arp_req=%0d arp_resolved=%0d ddc=%0d udp=%0d stall=%0d spi=%0d dac=%0d fir_taps=%0d fir_backpressure=%0d fir_reload=%0d iir_wait=%0d iir=%0d fft_fwd=%0d fft_inv=%0d unmapped=%0d",
             n_arp_req, n_arp_res, n_ddc, n_udp, n_stall, n_spi, n_dac, n_fir_imp, n_fir_full,
             n_fir_reload, n_iir_wait, n_iir_out, n_fft_fwd, n_fft_inv, n_unmapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
