// tb_fmc150_core: self-checking test of the FMC150 card interface.
// ADC: a model of the ADS62P49 drives channel A before each rising and
// channel B before each falling edge of adc_clkout (interleaved DDR bus);
// both channels must come out after the second rising edge (counting the
// capturing one), unchanged.
// DAC: random 16-bit C and D samples are held for four clk_fast cycles; the
// byte stream is decoded here from dac_frame (C high, C low, D high, D low)
// and must give back the samples; dac_dclk must toggle every clk_fast cycle.
// SPI: a slave model on each chip select shifts MOSI in on rising SCLK and
// shifts a reply out on falling SCLK (mode 0); transfers of 8, 24 and 32 bits
// to the three devices must deliver wdata, read back the reply, select only
// the addressed device, and run SCLK at clk/(2*SPI_CLK_DIV).
module tb_fmc150_core;
  logic clk = 0, rst = 1, adc_clkout = 0, clk_fast = 0;
  always #5 clk = ~clk;
  always #8.138 adc_clkout = ~adc_clkout;
  always #2.0345 clk_fast = ~clk_fast;
  int checks = 0, failures = 0;

  logic [13:0] adc_data, cha, chb;
  logic adc_clk;
  logic dac_rst;
  logic [15:0] chc, chd;
  logic [7:0] dac_data;
  logic dac_dclk, dac_frame;
  logic spi_start, spi_busy, spi_done, spi_sclk, spi_mosi, spi_miso;
  logic [1:0] spi_dev;
  logic [5:0] spi_nbits;
  logic [31:0] spi_wdata, spi_rdata;
  logic [2:0] spi_cs_n;

  fmc150_core dut (.clk, .rst, .adc_clkout, .adc_data, .adc_clk, .adc_cha_dout(cha), .adc_chb_dout(chb),
    .clk_fast, .dac_rst, .dac_chc_din(chc), .dac_chd_din(chd), .dac_data, .dac_dclk, .dac_frame,
    .spi_start, .spi_dev, .spi_nbits, .spi_wdata, .spi_busy, .spi_done, .spi_rdata,
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n);

  initial begin
    #500_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC ----------------
  logic [13:0] a_hist [$], b_hist [$];
  int adc_n = 0, adc_on = 0;
  initial begin
    adc_data = 0;
    forever begin
      logic [13:0] a, b;
      a = 14'($urandom); b = 14'($urandom);
      @(negedge adc_clkout); #2 adc_data = a;      // valid around the rising edge
      @(posedge adc_clkout); #2 adc_data = b;      // valid around the falling edge
      a_hist.push_back(a); b_hist.push_back(b);
    end
  end
  always @(posedge adc_clkout) begin
    adc_n++;
    // A is captured at rising edge k and B at the falling edge after it;
    // both are on the outputs after rising edge k+1. At this edge (values
    // before the update) the outputs show the pair captured at edge k-2,
    // which is the second newest entry of the history.
    if (adc_on && a_hist.size() > 1) begin
      checks++;
      if (cha != a_hist[a_hist.size()-2] || chb != b_hist[b_hist.size()-2]) begin
        failures++;
        if (failures < 10) $display("ADC A %h/%h B %h/%h", cha, a_hist[a_hist.size()-2], chb, b_hist[b_hist.size()-2]);
      end
    end
  end

  // ---------------- DAC ----------------
  logic [15:0] c_sent [$], d_sent [$];
  int bpos = -1, dac_words = 0;
  logic [31:0] word;
  logic dclk_q;
  initial begin
    dac_rst = 1; chc = 0; chd = 0;
    repeat (4) @(posedge clk_fast);
    @(negedge clk_fast) dac_rst = 0;
    forever begin
      // the interface takes C/D in the clock where its byte counter is 0,
      // which is the first clock after reset and every fourth one after that
      chc = 16'($urandom); chd = 16'($urandom);
      c_sent.push_back(chc); d_sent.push_back(chd);
      repeat (4) @(negedge clk_fast);
    end
  end
  always @(posedge clk_fast) begin
    if (!dac_rst) begin
      checks++;
      if (bpos >= 0 && dac_dclk == dclk_q) begin failures++; $display("dac_dclk did not toggle"); end
      dclk_q <= dac_dclk;
      if (dac_frame) bpos = 0;
      if (bpos >= 0) begin
        word = {word[23:0], dac_data};
        bpos++;
        if (bpos == 4) begin
          checks++;
          if (c_sent.size() == 0 || word != {c_sent[0], d_sent[0]}) begin
            failures++; if (failures < 10) $display("DAC word %h want %h%h", word, c_sent[0], d_sent[0]);
          end
          if (c_sent.size() > 0) begin void'(c_sent.pop_front()); void'(d_sent.pop_front()); end
          dac_words++;
          bpos = -1;
        end
      end
    end
  end

  // ---------------- SPI slave models ----------------
  logic [31:0] rx_sh, reply_sh;
  int nclk_sclk = 0, sclk_rises = 0;
  logic [31:0] reply = 32'hA5C3_0F96;
  always @(negedge spi_cs_n[0] or negedge spi_cs_n[1] or negedge spi_cs_n[2]) begin
    rx_sh = 0; sclk_rises = 0;
    reply_sh = reply << (32 - spi_nbits);
    spi_miso = reply_sh[31];
  end
  always @(posedge spi_sclk) begin
    rx_sh = {rx_sh[30:0], spi_mosi};
    sclk_rises++;
  end
  always @(negedge spi_sclk) begin
    reply_sh = reply_sh << 1;
    spi_miso = reply_sh[31];
  end

  task automatic spi_xfer(input logic [1:0] dev, input int nb, input logic [31:0] d);
    int t0, cyc = 0;
    logic [31:0] mask;
    @(negedge clk);
    spi_start = 1; spi_dev = dev; spi_nbits = 6'(nb); spi_wdata = d;
    @(negedge clk) spi_start = 0;
    #1;
    checks++;
    if (spi_cs_n != ~(3'b001 << dev) || !spi_busy) begin failures++; $display("chip select %b for device %0d", spi_cs_n, dev); end
    while (!spi_done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    mask = (nb == 32) ? 32'hFFFF_FFFF : ((32'd1 << nb) - 1);
    checks += 4;
    if ((rx_sh & mask) != (d & mask)) begin failures++; $display("SPI dev %0d got %h want %h", dev, rx_sh & mask, d & mask); end
    if ((spi_rdata & mask) != (reply & mask)) begin failures++; $display("SPI read %h want %h", spi_rdata, reply & mask); end
    if (sclk_rises != nb) begin failures++; $display("SPI %0d clocks for %0d bits", sclk_rises, nb); end
    // 2*CLK_DIV system clocks per bit plus start and end clocks
    if (cyc < 2 * 4 * nb - 2 || cyc > 2 * 4 * nb + 4) begin failures++; $display("SPI took %0d clocks", cyc); end
    @(posedge clk); #1;
    checks++;
    if (spi_cs_n != 3'b111 || spi_busy) begin failures++; $display("SPI did not end"); end
  endtask

  initial begin
    spi_start = 0; spi_dev = 0; spi_nbits = 0; spi_wdata = 0; spi_miso = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge adc_clkout);
    adc_on = 1;
    spi_xfer(2'd0, 32, 32'h6801_02C0);
    spi_xfer(2'd1, 24, 32'h00_1234);
    spi_xfer(2'd2, 8, 32'h0000_0042);
    repeat (300) @(posedge adc_clkout);
    checks++;
    if (dac_words < 500) begin failures++; $display("only %0d DAC words", dac_words); end
    $display("ADC samples %0d, DAC words %0d", adc_n, dac_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
