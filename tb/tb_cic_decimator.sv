// tb_cic_decimator: self-checking test of the CIC decimator.
// A 3-stage, R=8, M=2 decimator (internal width 16 + 3*4 = 28, output the top
// 20 bits) and a 10-stage R=128 M=1 one (the FM receiver's) get random data.
// The expected output is computed here without integrators or combs: the
// impulse response is the STAGES-fold convolution of a length R*M box, and
// the output for the decimation instant n is sum_k h[k] x[n-STAGES-k]
// (each of the pipelined integrators adds one clock), divided by the
// gain (R*M)^STAGES expressed as the dropped low bits. VLD must come once per
// R inputs, one clock after the R-th.
module tb_cic_decimator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic signed [15:0] din;
  logic va, vb;
  logic signed [19:0] da;
  logic signed [31:0] db;
  cic_decimator #(.DIN_WIDTH(16), .DOUT_WIDTH(20), .STAGES(3), .DIFF_DELAY(2), .RATE(8)) ua (
    .clk, .rst, .en, .din, .vld(va), .dout(da));
  cic_decimator #(.DIN_WIDTH(16), .DOUT_WIDTH(32)) ub (
    .clk, .rst, .en, .din, .vld(vb), .dout(db));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ha [$];
  int x [$];

  task automatic mkh(input int S, input int L);
    longint t [$];
    longint h [$];
    h.push_back(1);
    for (int s = 0; s < S; s++) begin
      t = {};
      for (int i = 0; i < h.size() + L - 1; i++) begin
        automatic longint acc = 0;
        for (int j = 0; j < L; j++) if (i - j >= 0 && i - j < h.size()) acc += h[i - j];
        t.push_back(acc);
      end
      h = t;
    end
    ha = h;
  endtask

  int na = 0, nb = 0;
  initial begin
    longint acc;
    longint hb_sum;
    mkh(3, 16);
    $display("response length %0d", ha.size());
    en = 0; din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 128 * 20; n++) begin
      @(negedge clk);
      en = 1;
      // first part: random; later: DC full scale (checks gain of the big one)
      din = (n < 128 * 6) ? 16'($urandom_range(0, 65535) - 32768) : 16'sd20000;
      x.push_back(int'(din));
      @(posedge clk); #1;
      if ((n + 1) % 8 == 0) begin
        acc = 0;
        for (int k = 0; k < ha.size(); k++) begin
          automatic int i = n - 3 - k;
          if (i >= 0) acc += ha[k] * x[i];
        end
        checks++;
        if (!va || longint'(da) != (acc >>> 8)) begin
          failures++;
          if (failures < 10) $display("A n=%0d got %0d want %0d", n, da, acc >>> 8);
        end
        na++;
      end else begin
        checks++;
        if (va) failures++;
      end
      if ((n + 1) % 128 == 0) begin
        checks++;
        if (!vb) failures++;
        nb++;
        // after the DC input has filled the 10*128-sample response, the
        // output must be 20000 * 2^16 (full-scale alignment), within rounding
        if (n >= 128 * 20 - 1) begin
          checks++;
          if (db < 32'sd1310720000 - 32'sd70000 || db > 32'sd1310720000) begin
            failures++; $display("B DC output %0d want about %0d", db, 1310720000);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
