// tb_fir_core: self-checking test of the FIR core in all four structures.
//  u0: transposed, 21 taps, coefficients from the generic (the CIC compensator)
//  u1: odd-symmetric, 7 taps, 3 coefficients loaded through LOADC
//  u2: even-symmetric, 8 taps, 4 coefficients loaded through LOADC
//  u3: moving average, 5 taps
//  u4: transposed, 95 taps - the length of the band-pass filter used to verify
//      the core at fs = 10 kHz. Its taps are a Hamming-windowed band-pass for
//      1.9-2.5 kHz computed here at elaboration (this testbench's choice of a
//      band around the reference 2.2 kHz; the reference design used
//      Parks-McClellan taps). It runs the random stream, then a 2.2 kHz tone
//      (must pass with gain 0.8-1.2) and a 500 Hz tone (must be below 1 %).
// Random samples (with gaps) drive all four; each output is compared with a
// direct convolution done here with the full impulse response, including
// the output shift and saturation. Also checked: VLD one clock after EN,
// no output before the coefficients are loaded, and RDY behaviour.
module tb_fir_core;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, loadc1, loadc2;
  logic signed [15:0] coeff1, coeff2, din;
  logic v0, v1, v2, v3, r0, r1, r2, r3;
  logic signed [15:0] d0, d1, d2, d3;

  localparam int H1 [7] = '{0, 0, 0, 0, 0, 0, 0};
  localparam int H2 [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  localparam int H5 [5] = '{0, 0, 0, 0, 0};
  fir_core #(.NUM_OF_TAPS(21), .LATENCY(0)) u0 (.clk, .rst, .en, .loadc(1'b0), .coeff(16'sd0), .din, .vld(v0), .dout(d0), .rdy(r0));
  fir_core #(.NUM_OF_TAPS(7), .COEFFS(H1), .LATENCY(1), .INTERNAL_COEFFS(0)) u1 (.clk, .rst, .en, .loadc(loadc1), .coeff(coeff1), .din, .vld(v1), .dout(d1), .rdy(r1));
  fir_core #(.NUM_OF_TAPS(8), .COEFFS(H2), .LATENCY(2), .INTERNAL_COEFFS(0)) u2 (.clk, .rst, .en, .loadc(loadc2), .coeff(coeff2), .din, .vld(v2), .dout(d2), .rdy(r2));
  typedef int taps95_t [95];
  function automatic taps95_t bp_taps();
    taps95_t h;
    for (int k = 0; k < 95; k++) begin
      real m, w, v;
      m = real'(k - 47);
      w = 0.54 - 0.46 * $cos(2.0 * PI * k / 94.0);
      v = (k == 47) ? 2.0 * (0.25 - 0.19)
                    : ($sin(2.0 * PI * 0.25 * m) - $sin(2.0 * PI * 0.19 * m)) / (PI * m);
      h[k] = $rtoi($floor(32767.0 * w * v + 0.5));
    end
    return h;
  endfunction
  localparam taps95_t HBP = bp_taps();
  logic v4, r4;
  logic signed [15:0] d4;
  fir_core #(.NUM_OF_TAPS(95), .COEFFS(HBP), .LATENCY(0)) u4 (.clk, .rst, .en, .loadc(1'b0), .coeff(16'sd0), .din, .vld(v4), .dout(d4), .rdy(r4));
  fir_core #(.NUM_OF_TAPS(5), .LATENCY(3), .COEFFS(H5)) u3 (.clk, .rst, .en, .loadc(1'b0), .coeff(16'sd0), .din, .vld(v3), .dout(d3), .rdy(r3));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h0 [21], h1 [7], h2 [8], h4 [95];
  int hist [$];          // accepted inputs, newest last
  int nout = 0;
  real tone_f [2] = '{2200.0, 500.0};

  function automatic int sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int conv(input int h [], input int T);
    longint acc = 0;
    for (int k = 0; k < T; k++)
      if (hist.size() - 1 - k >= 0) acc += longint'(h[k]) * hist[hist.size() - 1 - k];
    return sat16(acc >>> 15);
  endfunction
  function automatic int mavg(input int T);
    longint acc = 0;
    for (int k = 0; k < T; k++)
      if (hist.size() - 1 - k >= 0) acc += hist[hist.size() - 1 - k];
    return sat16((acc * ((65536 + T / 2) / T)) >>> 16);
  endfunction

  task automatic chk(input string nm, input logic v, input int got, input int want);
    checks++;
    if (!v || got != want) begin
      failures++;
      if (failures < 10) $display("%s: vld=%0d got %0d want %0d", nm, v, got, want);
    end
  endtask

  initial begin
    int e0 [], e1 [], e2 [];
    int w0, w1, w2, w3, w4, pk;
    real ph;
    en = 0; loadc1 = 0; loadc2 = 0; coeff1 = 0; coeff2 = 0; din = 0;
    for (int k = 0; k < 21; k++) h0[k] = CFIR_COEFFS[k];
    for (int k = 0; k < 95; k++) h4[k] = HBP[k];
    // odd symmetric: h[k] = -h[6-k], centre 0
    h1 = '{3000, -7000, 12000, 0, -12000, 7000, -3000};
    // even symmetric: h[k] = h[7-k]
    h2 = '{-2000, 5000, 9000, 16000, 16000, 9000, 5000, -2000};
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    // before loading: u1/u2 not ready and produce nothing
    en = 1; din = 100;
    @(posedge clk); #1;
    checks++;
    if (r1 || r2 || v1 || v2 || !r0 || !r3) begin failures++; $display("ready/valid before load wrong"); end
    @(negedge clk); en = 0;
    rst = 1; @(negedge clk); rst = 0;      // start clean
    // u1 takes M = floor(7/2) = 3 coefficients, u2 M = ceil(8/2) = 4
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      loadc1 = (k < 3); coeff1 = 16'(h1[k % 3]);
      loadc2 = 1;       coeff2 = 16'(h2[k]);
      #1;
      if (k == 2) begin
        @(posedge clk); #1;
        checks++;
        if (!r1 || r2) begin failures++; $display("load: r1=%0d r2=%0d (want 1 0)", r1, r2); end
        @(negedge clk);
        loadc1 = 0; loadc2 = 1; coeff2 = 16'(h2[3]);
        k++;
      end
    end
    @(negedge clk); loadc1 = 0; loadc2 = 0;
    checks++;
    if (!r1 || !r2) begin failures++; $display("load: r1=%0d r2=%0d (want 1 1)", r1, r2); end
    // random stream
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      din = 16'($urandom_range(0, 50000) - 25000);
      if (n > 250) din = 16'(32767);      // drive into saturation at the end
      if (en) begin
        hist.push_back(int'(din));
        w0 = conv(h0, 21); w1 = conv(h1, 7); w2 = conv(h2, 8); w3 = mavg(5); w4 = conv(h4, 95);
        @(posedge clk); #1;
        chk("transpose", v0, int'(d0), w0);
        chk("oddsym", v1, int'(d1), w1);
        chk("evensym", v2, int'(d2), w2);
        chk("movavg", v3, int'(d3), w3);
        chk("bandpass95", v4, int'(d4), w4);
        nout++;
      end else begin
        @(posedge clk); #1;
        checks++;
        if (v0 || v1 || v2 || v3) begin failures++; $display("vld without en"); end
      end
    end
    // 95-tap band-pass: a tone in the pass band, then one in the stop band
    foreach (tone_f[t]) begin
      pk = 0; ph = 0.0;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        en = 1;
        din = 16'($rtoi($floor(10000.0 * $cos(ph) + 0.5)));
        ph = ph + 2.0 * PI * tone_f[t] / 10.0e3;
        hist.push_back(int'(din));
        w4 = conv(h4, 95);
        @(posedge clk); #1;
        chk("bandpass95 tone", v4, int'(d4), w4);
        if (n >= 200 && d4 > pk) pk = int'(d4);
      end
      checks++;
      if (t == 0 && (pk < 8000 || pk > 12000)) begin failures++; $display("2.2 kHz tone peak %0d", pk); end
      if (t == 1 && pk > 100) begin failures++; $display("500 Hz tone peak %0d", pk); end
      $display("95-tap band-pass: %0.0f Hz tone peak %0d (input 10000)", tone_f[t], pk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
