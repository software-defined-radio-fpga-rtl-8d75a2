// tb_double_buffer: self-checking test of the ping-pong buffer and its
// clock-domain crossing.
// u0 (N = 33) is written at one word every 4 clocks of a 122.88 MHz-like
// write clock and read with a 125 MHz-like read clock: every burst must be
// N consecutive out_vld clocks with out_first on the first and out_last on
// the last word, carry exactly the next N words written, start within 8 read
// clocks after the buffer's last word is written, and no overrun may occur.
// u1 (N = 8) is written every clock while its read clock is three times
// slower, so bursts overlap the next buffer: overruns must be counted.
module tb_double_buffer;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, rclk1 = 0;
  always #4.07 wclk = ~wclk;
  always #4 rclk = ~rclk;
  always #12 rclk1 = ~rclk1;
  int checks = 0, failures = 0;

  logic wr_en, wr_en1;
  logic [31:0] wr_data, wr_data1;
  logic v0, f0, l0, v1, f1, l1;
  logic [31:0] d0, d1;
  logic [15:0] p0, o0, p1, o1;
  double_buffer u0 (.wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .rd_clk(rclk), .rd_rst(rrst),
    .out_vld(v0), .out_first(f0), .out_last(l0), .out_data(d0), .packets(p0), .overruns(o0));
  double_buffer #(.N(8)) u1 (.wr_clk(wclk), .wr_rst(wrst), .wr_en(wr_en1), .wr_data(wr_data1),
    .rd_clk(rclk1), .rd_rst(rrst),
    .out_vld(v1), .out_first(f1), .out_last(l1), .out_data(d1), .packets(p1), .overruns(o1));

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] written [$];
  realtime last_wr_t [$];
  int nwr = 0;
  always @(posedge wclk) begin
    if (!wrst && wr_en) begin
      written.push_back(wr_data);
      nwr++;
      if (nwr % 33 == 0) last_wr_t.push_back($realtime);
    end
  end

  int bursts = 0, pos = 0;
  always @(posedge rclk) begin
    if (!rrst) begin
      if (v0) begin
        checks++;
        if (f0 != (pos == 0) || l0 != (pos == 32) || written.size() == 0 || d0 != written[0]) begin
          failures++;
          if (failures < 10) $display("burst %0d word %0d: data %h first %b last %b", bursts, pos, d0, f0, l0);
        end
        if (pos == 0) begin
          checks++;
          if (last_wr_t.size() == 0 || $realtime - last_wr_t[0] > 8 * 8.0 + 1) begin
            failures++; $display("burst %0d started late", bursts);
          end
          if (last_wr_t.size() > 0) void'(last_wr_t.pop_front());
        end
        if (written.size() > 0) void'(written.pop_front());
        pos++;
        if (pos == 33) begin pos = 0; bursts++; end
      end else if (pos != 0) begin
        checks++; failures++; $display("gap inside burst %0d", bursts); pos = 0;
      end
    end
  end

  initial begin
    wr_en = 0; wr_data = 0; wr_en1 = 0; wr_data1 = 0;
    #50;
    @(negedge wclk) wrst = 0;
    @(negedge rclk) rrst = 0;
    for (int n = 0; n < 33 * 4 * 20; n++) begin
      @(negedge wclk);
      wr_en = (n % 4 == 0);
      wr_data = $urandom;
      wr_en1 = 1;
      wr_data1 = n;
    end
    @(negedge wclk) begin wr_en = 0; wr_en1 = 0; end
    #2000;
    checks += 4;
    if (bursts != 20 || p0 != 16'd20) begin failures++; $display("u0 bursts %0d packets %0d", bursts, p0); end
    if (o0 != 0) begin failures++; $display("u0 overruns %0d", o0); end
    if (o1 == 0) begin failures++; $display("u1 never overran"); end
    if (p1 == 0) begin failures++; $display("u1 sent nothing"); end
    $display("u0: %0d packets, %0d overruns; u1: %0d packets, %0d overruns", p0, o0, p1, o1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
