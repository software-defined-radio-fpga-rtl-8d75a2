// tb_fft_r22sdf: self-checking test of the radix-2^2 SDF FFT.
// Two instances run side by side, 32 points (odd N, ends in a half stage) and
// 16 points (even N). Each gets three random frames in forward mode, then a
// frame of zeros to push the last frame out. Every output bin, taken in
// bit-reversed order, is compared with a DFT computed here in floating point.
// Then both cores are reset and the same is done in inverse mode (inv high),
// where every bin must match the DFT with the conjugate kernel exp(+j...),
// i.e. P times the inverse DFT, as no 1/P scaling is applied.
// The latency check: the first valid output must come out exactly when the
// documented pipeline depth says it should.
module tb_fft_r22sdf;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 5, NB = 4, DW = 16;
  localparam int PA = 1 << NA, PB = 1 << NB;

  logic en, inv;
  logic signed [DW-1:0] xr, xi;
  logic va, vb;
  logic signed [DW+NA-1:0] ar, ai;
  logic signed [DW+NB-1:0] br, bi;

  fft_r22sdf #(.N(NA), .DIN_WIDTH(DW)) dut_a (.clk, .rst, .en, .inv, .xsr(xr), .xsi(xi), .vld(va), .xkr(ar), .xki(ai));
  fft_r22sdf #(.N(NB), .DIN_WIDTH(DW)) dut_b (.clk, .rst, .en, .inv, .xsr(xr), .xsi(xi), .vld(vb), .xkr(br), .xki(bi));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(input int v, input int n);
    int r = 0;
    for (int i = 0; i < n; i++) if (v & (1 << i)) r |= 1 << (n - 1 - i);
    return r;
  endfunction

  // input frames stored for reference
  int in_r [$], in_i [$];
  int oa_r [$], oa_i [$], ob_r [$], ob_i [$];
  int first_a = -1, cyc = 0, in_cnt = 0, first_in = -1;
  always @(posedge clk) begin
    cyc++;
    if (en && !rst) begin in_cnt++; if (first_in < 0) first_in = cyc; end
    if (va) begin oa_r.push_back(int'(ar)); oa_i.push_back(int'(ai)); if (first_a < 0) first_a = cyc; end
    if (vb) begin ob_r.push_back(int'(br)); ob_i.push_back(int'(bi)); end
  end

  task automatic check_frames(input int n, input int p, input int nfr, ref int o_r[$], ref int o_i[$], input bit inverse);
    for (int f = 0; f < nfr; f++) begin
      for (int m = 0; m < p; m++) begin
        int k = bitrev(m, n);
        real sr = 0, si = 0, tol;
        for (int t = 0; t < p; t++) begin
          real ang = (inverse ? 2.0 : -2.0) * 3.141592653589793 * k * t / p;
          sr += in_r[f*p+t] * $cos(ang) - in_i[f*p+t] * $sin(ang);
          si += in_r[f*p+t] * $sin(ang) + in_i[f*p+t] * $cos(ang);
        end
        tol = 6.0 * n + 1e-4 * p * 32768.0;
        checks++;
        if ((o_r[f*p+m] - sr) > tol || (sr - o_r[f*p+m]) > tol ||
            (o_i[f*p+m] - si) > tol || (si - o_i[f*p+m]) > tol) begin
          failures++;
          if (failures < 10) $display("N=%0d frame %0d bin %0d: got %0d,%0d want %f,%f", n, f, k, o_r[f*p+m], o_i[f*p+m], sr, si);
        end
      end
    end
  endtask

  task automatic run(input bit inverse);
    in_r = {}; in_i = {}; oa_r = {}; oa_i = {}; ob_r = {}; ob_i = {};
    first_a = -1; first_in = -1;
    @(negedge clk);
    rst = 1; inv = inverse;
    repeat (2) @(negedge clk);
    rst = 0;
    // 3 random frames of 32 samples (the 16-point core sees 6 frames)
    for (int s = 0; s < 3 * PA; s++) begin
      @(negedge clk);
      en = (s < PA) || ($urandom_range(0, 3) != 0);   // gaps after frame 0
      if (!en) begin s--; continue; end
      xr = DW'($urandom_range(0, 65535) - 32768);
      xi = DW'($urandom_range(0, 65535) - 32768);
      in_r.push_back(int'(xr)); in_i.push_back(int'(xi));
    end
    // flush with zeros
    for (int s = 0; s < PA; s++) begin
      @(negedge clk); en = 1; xr = 0; xi = 0;
    end
    @(negedge clk); en = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (oa_r.size() < 3 * PA || ob_r.size() < 6 * PB) begin
      failures++; $display("too few outputs %0d %0d", oa_r.size(), ob_r.size());
    end else begin
      check_frames(NA, PA, 3, oa_r, oa_i, inverse);
      check_frames(NB, PB, 6, ob_r, ob_i, inverse);
    end
    // latency: with a gap-free first frame, bin 0 leaves P-1 clocks after the
    // first sample plus one clock per pipeline register (6 for 32 points:
    // BFI, BFII, multiplier, BFI, BFII, BFI)
    checks++;
    if (first_a - first_in != PA + 6) begin  // +1: seen one edge after it is registered
      failures++; $display("latency %0d clocks, expected %0d", first_a - first_in, PA + 6);
    end
  endtask

  initial begin
    en = 0; inv = 0; xr = 0; xi = 0;
    repeat (3) @(posedge clk);
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
