// tb_iir_sos: self-checking test of the biquad-cascade IIR core.
// Sixteen sections - the size the core is benchmarked at - are loaded
// through LOADC (80 words, b0 b1 b2 a1 a2 per section, Q2.14): a resonant
// low-pass, a notch, then alternately a pass-through and a two-tap average.
// A step and then random samples are fed, one per clock; every output is
// compared with a Direct-Form-I model written here (same Q2.14 rounding by
// arithmetic shift and saturation to 16 bits). The latency must be STAGES
// clocks from EN to VLD, and nothing may come out before loading is done.
module tb_iir_sos;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int S = 16;

  logic en, loadc, vld, rdy;
  logic signed [15:0] coeff, din, dout;
  iir_sos #(.STAGES(S)) dut (.clk, .rst, .en, .loadc, .coeff, .din, .vld, .dout, .rdy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c [5*S];
  int x1 [S], x2 [S], y1 [S], y2 [S];
  int expq [$];

  function automatic int model(input int x);
    int v = x;
    for (int s = 0; s < S; s++) begin
      longint acc;
      int y;
      acc = longint'(c[5*s]) * v + longint'(c[5*s+1]) * x1[s] + longint'(c[5*s+2]) * x2[s]
          - longint'(c[5*s+3]) * y1[s] - longint'(c[5*s+4]) * y2[s];
      acc = acc >>> 14;
      y = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
      x2[s] = x1[s]; x1[s] = v; y2[s] = y1[s]; y1[s] = y;
      v = y;
    end
    return v;
  endfunction

  int sent_cyc [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (vld) begin
      int w, t0;
      w = expq.pop_front();
      t0 = sent_cyc.pop_front();
      checks++;
      if (int'(dout) != w) begin failures++; if (failures < 10) $display("got %0d want %0d", dout, w); end
      checks++;
      if (cyc - t0 != S + 1) begin /* taken at edge t0+1, out S edges later */ failures++; if (failures < 10) $display("latency %0d", cyc - t0); end
    end
  end

  initial begin
    // section 0: low-pass, section 1: notch, then pass-through / average
    for (int s = 2; s < S; s++) begin
      c[5*s] = (s % 2 == 0) ? 16384 : 8192; c[5*s+1] = (s % 2 == 0) ? 0 : 8192;
      c[5*s+2] = 0; c[5*s+3] = 0; c[5*s+4] = 0;
    end
    c[0:4] = '{1200, 2400, 1200, -24000, 10000};
    c[5:9] = '{16384, -20000, 16384, -19000, 14000};
    en = 0; loadc = 0; coeff = 0; din = 0;
    for (int s = 0; s < S; s++) begin x1[s] = 0; x2[s] = 0; y1[s] = 0; y2[s] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk); en = 1; din = 1000;
    @(negedge clk); en = 0;
    checks++;
    if (rdy) begin failures++; $display("ready before load"); end
    for (int k = 0; k < 5 * S; k++) begin
      @(negedge clk); loadc = 1; coeff = 16'(c[k]);
    end
    @(negedge clk); loadc = 0;
    checks++;
    if (!rdy) begin failures++; $display("not ready after load"); end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = 1;
      din = (n < 100) ? 16'sd8000 : 16'($urandom_range(0, 40000) - 20000);
      expq.push_back(model(int'(din)));
      sent_cyc.push_back(cyc);
    end
    @(negedge clk); en = 0;
    repeat (S + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
