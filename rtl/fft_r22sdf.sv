// fft_r22sdf: pipelined radix-2^2 single-path delay-feedback FFT/IFFT of
// 2^N points on a stream of complex samples.
//
// Structure (Fig. 7 of the design, generalised): for each pair of bits of
// the point count there is a full stage of block length L = 2^N, 2^(N-2), ...
// made of a type-I butterfly (L/2-word feedback delay), a type-II butterfly
// (L/4-word delay, trivial -j twiddle) and, except in the last full stage
// where every twiddle is 1, a complex multiplier with an L-entry twiddle ROM.
// An odd N ends with a half stage: one type-I butterfly with a 1-word delay.
// Every butterfly widens the data by one bit, so DOUT_WIDTH = DIN_WIDTH + N
// and no scaling happens inside; the multipliers keep the width.
//
// Interface: EN marks a valid input sample (XSr, XSi), given in natural
// order. VLD marks output samples (XKr, XKi), which come out in bit-reversed
// order: the m-th output of a frame is bin bitreverse_N(m). The pipeline only
// moves on valid samples, so the last frame leaves while the next one (or
// padding) enters; the first output of a frame appears once 2^N - 1 further
// samples have entered, plus one clock per pipeline register. INV selects the
// inverse transform by conjugating all twiddle factors (no 1/2^N scaling).
//
// The R2^2 SDF architecture, bit growth, bit-reversed output and IFFT by
// twiddle conjugation follow the document; the valid-driven flow control and
// the twiddle format (Q1.TF_WIDTH-1) are this design's choices.
module fft_r22sdf #(
  parameter int N         = 10,  // log2 of the number of points
  parameter int DIN_WIDTH = 16,
  parameter int TF_WIDTH  = 16,
  localparam int DOUT_WIDTH = DIN_WIDTH + N
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic                         inv,
  input  logic signed [DIN_WIDTH-1:0]  xsr, xsi,
  output logic                         vld,
  output logic signed [DOUT_WIDTH-1:0] xkr, xki
);
  localparam int NP = N / 2;         // full stages
  localparam int HALF = N % 2;       // trailing half stage

  // stage s input width: DIN_WIDTH + 2 s
  logic                              sv [NP+1];
  logic signed [DIN_WIDTH+N-1:0]     sr [NP+1];
  logic signed [DIN_WIDTH+N-1:0]     si [NP+1];

  assign sv[0] = en;
  assign sr[0] = (DIN_WIDTH+N)'(xsr);
  assign si[0] = (DIN_WIDTH+N)'(xsi);

  for (genvar s = 0; s < NP; s++) begin : g_stage
    localparam int WI = DIN_WIDTH + 2 * s;
    localparam int LG = N - 2 * s;
    logic v1, v2;
    logic signed [WI:0]   r1, i1;
    logic signed [WI+1:0] r2, i2;

    fft_bf1 #(.W(WI), .LOG2L(LG)) u_bf1 (
      .clk, .rst, .vin(sv[s]), .xr(WI'(sr[s])), .xi(WI'(si[s])),
      .vout(v1), .yr(r1), .yi(i1));
    fft_bf2 #(.W(WI + 1), .LOG2L(LG)) u_bf2 (
      .clk, .rst, .inv, .vin(v1), .xr(r1), .xi(i1),
      .vout(v2), .yr(r2), .yi(i2));

    if (LG > 2) begin : g_tw
      logic v3;
      logic signed [WI+1:0] r3, i3;
      fft_twiddle_mult #(.W(WI + 2), .LOG2L(LG), .TF_WIDTH(TF_WIDTH)) u_tw (
        .clk, .rst, .inv, .vin(v2), .xr(r2), .xi(i2),
        .vout(v3), .yr(r3), .yi(i3));
      assign sv[s+1] = v3;
      assign sr[s+1] = (DIN_WIDTH+N)'(r3);
      assign si[s+1] = (DIN_WIDTH+N)'(i3);
    end else begin : g_notw
      assign sv[s+1] = v2;
      assign sr[s+1] = (DIN_WIDTH+N)'(r2);
      assign si[s+1] = (DIN_WIDTH+N)'(i2);
    end
  end

  if (HALF == 1) begin : g_half
    localparam int WI = DIN_WIDTH + 2 * NP;
    logic signed [WI:0] rh, ih;
    fft_bf1 #(.W(WI), .LOG2L(1)) u_bf1 (
      .clk, .rst, .vin(sv[NP]), .xr(WI'(sr[NP])), .xi(WI'(si[NP])),
      .vout(vld), .yr(rh), .yi(ih));
    assign xkr = rh;
    assign xki = ih;
  end else begin : g_nohalf
    assign vld = sv[NP];
    assign xkr = sr[NP];
    assign xki = si[NP];
  end
endmodule
