// tb_ddc_core: self-checking test of the digital down-converter.
// u0 is the receiver configuration at its defaults (CIC R=128, N=10, 21-tap
// compensating FIR, no second CIC). The input is a real tone generated here
// at an offset from the NCO frequency:
//   - offset +20 kHz (at 122.88 MHz input rate): the output must be a phasor
//     of magnitude A/2 within 5 % whose phase advances by 2*pi*20k/960k per
//     output (positive rotation - checks the sign of the Q mixer);
//   - offset +1.5 MHz: far outside the channel, the output must stay below
//     1 % of A/2.
// VLD must come exactly every 128 inputs and CLKO must toggle at that rate.
// u1 is a small configuration (CIC1 R=8 N=3, 3-tap FIR loaded at run time,
// CIC2 R=2 N=4): RDY must be low until the two coefficients are loaded and no
// VLD may appear before that; with a zero NCO word and the loaded taps
// {0, 32767, 0} a DC input must come out unchanged within 8 LSB on I with Q
// zero, and VLD must come every 16 inputs.
// u2 is the benchmark configuration: 122.88 MSPS in, 1.28 MSPS out, i.e. CIC1
// R=96 with the other defaults. Its VLD must come every 96 inputs. (With R
// not a power of two the CIC gain is (96/128)^10, so only the rate is checked.)
module tb_ddc_core;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic signed [15:0] din;
  logic [31:0] ftw0, ftw1;
  logic loadc;
  logic signed [15:0] coeff;
  logic rdy0, vld0, clko0, rdy1, vld1, clko1;
  logic signed [15:0] i0, q0, i1, q1;
  localparam int HZ[3] = '{0, 0, 0};

  ddc_core u0 (.clk, .rst, .en, .din, .ftw(ftw0), .loadc(1'b0), .coeff(16'sd0),
               .rdy(rdy0), .vld(vld0), .clko(clko0), .iout(i0), .qout(q0));
  int nin = 0;
  logic vld2;
  logic signed [15:0] i2, q2;
  int last_v2 = -1, nout2 = 0;
  ddc_core #(.SAMPLE_RATE_CHANGE1(96)) u2 (.clk, .rst, .en, .din, .ftw(ftw0), .loadc(1'b0), .coeff(16'sd0),
               .rdy(), .vld(vld2), .clko(), .iout(i2), .qout(q2));
  always @(posedge clk) begin
    if (vld2 && !rst) begin
      if (last_v2 >= 0) begin
        checks++;
        if (nin - last_v2 != 96) begin failures++; $display("u2 VLD spacing %0d", nin - last_v2); end
      end
      last_v2 = nin;
      nout2++;
    end
  end
  ddc_core #(.NUMBER_OF_STAGES1(3), .SAMPLE_RATE_CHANGE1(8), .NUMBER_OF_TAPS(3),
             .COEFFS(HZ), .INTERNAL_COEFFS(1'b0), .SELECT_CIC2(1'b1)) u1 (
    .clk, .rst, .en, .din, .ftw(ftw1), .loadc, .coeff,
    .rdy(rdy1), .vld(vld1), .clko(clko1), .iout(i1), .qout(q1));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.141592653589793;
  localparam real FS = 122.88e6;
  real f_in;
  real amp = 16000.0;
  real ph = 0.0;
  int  last_v0 = -1, last_v1 = -1, clko_edges = 0;
  bit  dc_mode = 0;
  int  nout0 = 0, nout1 = 0;
  real mag [$], ang [$];
  bit  clko_q;

  // input generator: one sample per clock (en always high after reset)
  always @(negedge clk) begin
    if (!rst) begin
      en  <= 1'b1;
      din <= dc_mode ? 16'sd12000 : 16'($rtoi($floor(amp * $cos(ph) + 0.5)));
      ph  = ph + 2.0 * PI * f_in / FS;
      if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
    end
  end

  always @(posedge clk) if (!rst && en) nin++;

  always @(posedge clk) begin
    clko_q <= clko0;
    if (!rst && clko0 && !clko_q) clko_edges++;
    if (vld0 && !rst) begin
      if (last_v0 >= 0) begin
        checks++;
        if (nin - last_v0 != 128) begin failures++; $display("u0 VLD spacing %0d", nin - last_v0); end
      end
      last_v0 = nin;
      nout0++;
      mag.push_back($sqrt(real'(i0) * i0 + real'(q0) * q0));
      ang.push_back($atan2(real'(q0), real'(i0)));
    end
    if (vld1 && !rst) begin
      checks++;
      if (!rdy1) begin failures++; $display("u1 VLD before RDY"); end
      if (last_v1 >= 0) begin
        checks++;
        if (nin - last_v1 != 16) begin failures++; $display("u1 VLD spacing %0d", nin - last_v1); end
      end
      last_v1 = nin;
      nout1++;
    end
  end

  initial begin
    real d, want;
    int e0;
    en = 0; din = 0; loadc = 0; coeff = 0;
    f_in = 10.7e6 + 20.0e3;
    ftw0 = 32'($rtoi(10.7e6 / FS * 4294967296.0));
    ftw1 = 32'd0;
    repeat (4) @(posedge clk);
    rst = 0;
    // ---- tone in the channel ----
    repeat (128 * 80) @(posedge clk);
    checks++;
    if (rdy1 || nout1 != 0) begin failures++; $display("u1 ran without coefficients"); end
    want = amp / 2.0;
    for (int k = 40; k < mag.size(); k++) begin
      checks++;
      if (mag[k] < 0.95 * want || mag[k] > 1.05 * want) begin
        failures++; if (failures < 10) $display("u0 magnitude %f want %f", mag[k], want);
      end
      d = ang[k] - ang[k-1];
      if (d < -PI) d = d + 2.0 * PI;
      if (d >  PI) d = d - 2.0 * PI;
      checks++;
      if (d < 2.0 * PI * 20.0e3 / 960.0e3 - 0.01 || d > 2.0 * PI * 20.0e3 / 960.0e3 + 0.01) begin
        failures++; if (failures < 10) $display("u0 phase step %f", d);
      end
    end
    checks++;
    if (nout2 < 100) begin failures++; $display("u2: only %0d outputs", nout2); end
    $display("u0: %0d outputs, magnitude %f (want %f)", mag.size(), mag[mag.size()-1], want);
    checks++;
    if (clko_edges < 75 || clko_edges > 81) begin failures++; $display("CLKO edges %0d", clko_edges); end
    // ---- tone far out of the channel ----
    f_in = 10.7e6 + 1.5e6;
    e0 = mag.size();
    repeat (128 * 60) @(posedge clk);
    for (int k = e0 + 35; k < mag.size(); k++) begin
      checks++;
      if (mag[k] > 0.01 * want) begin
        failures++; if (failures < 10) $display("u0 stop-band magnitude %f", mag[k]);
      end
    end
    $display("u0: stop-band magnitude %f", mag[mag.size()-1]);
    // ---- small configuration: load taps, then DC ----
    dc_mode = 1;
    @(negedge clk);
    loadc = 1; coeff = 16'sd0;
    @(negedge clk);
    checks++;
    if (rdy1) begin failures++; $display("u1 RDY after one of two coefficients"); end
    coeff = 16'sd32767;
    @(negedge clk);
    loadc = 0;
    @(posedge clk); #1;
    checks++;
    if (!rdy1) begin failures++; $display("u1 RDY missing after load"); end
    repeat (16 * 30) @(posedge clk);
    #1;
    checks++;
    if (nout1 < 25 || i1 < 16'sd11992 || i1 > 16'sd12000 || q1 != 0) begin
      failures++; $display("u1 DC out i=%0d q=%0d outputs=%0d", i1, q1, nout1);
    end
    $display("u1: %0d outputs, DC i=%0d q=%0d", nout1, i1, q1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
