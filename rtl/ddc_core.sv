// ddc_core: digital down converter - the first processing after the ADC.
//
// Chain (Fig. 9 of the design): the NCO produces cos/sin at the tuning word
// FTW; a quadrature mixer forms I = x*cos and Q = -x*sin (16 bits each); CIC1
// decimates by SAMPLE_RATE_CHANGE1 to CIC_WIDTH bits; a compensating FIR
// (fir_core, even-symmetric by default) flattens the CIC passband droop and
// returns DOUT_WIDTH bits; CIC2 optionally decimates further. Each of CIC1,
// C-FIR and CIC2 can be left out with its SELECT_* generic; a stage left out
// is a wire whose value keeps its most-significant-bit alignment.
// All numbers are treated as fractions aligned at the MSB, so full scale at
// the input maps to full scale at every stage.
//
// Interface: EN marks a valid input sample on DIN (one per clock at most).
// VLD pulses with every output pair IOUT/QOUT, i.e. once per
// SAMPLE_RATE_CHANGE1*SAMPLE_RATE_CHANGE2 (selected stages only) inputs.
// RDY is high once the C-FIR has its coefficients (right after reset with
// internal coefficients, otherwise after loading them through LOADC/COEFF).
// CLKO is a square wave at the output rate, high during the first half of
// each output period, for logic that wants an output-rate clock.
//
// Defaults are the FM receiver's: CIC1 R=128, N=10, M=1, a 21-tap C-FIR,
// no CIC2, 16-bit in and out, 32 bits between CIC and C-FIR (Fig. 24).
// The generics are the document's; the phase width (32), the table size,
// the CIC2 defaults and the mixer scaling are this design's choices.
module ddc_core
  import sdr_pkg::*;
#(
  parameter int DIN_WIDTH           = 16,
  parameter int DOUT_WIDTH          = 16,
  parameter int PHASE_WIDTH         = 32,
  parameter int PHASE_DITHER_WIDTH  = 0,
  parameter int LUT_ADDR            = 10,
  parameter bit SELECT_CIC1         = 1'b1,
  parameter int NUMBER_OF_STAGES1   = 10,
  parameter int DIFFERENTIAL_DELAY1 = 1,
  parameter int SAMPLE_RATE_CHANGE1 = 128,
  parameter int CIC_WIDTH           = 32,
  parameter bit SELECT_CFIR         = 1'b1,
  parameter int NUMBER_OF_TAPS      = CFIR_TAPS,
  parameter int FIR_LATENCY         = 2,
  parameter int COEFF_WIDTH         = 16,
  parameter int COEFFS [NUMBER_OF_TAPS] = CFIR_COEFFS,
  parameter bit INTERNAL_COEFFS     = 1'b1,
  parameter bit SELECT_CIC2         = 1'b0,
  parameter int NUMBER_OF_STAGES2   = 4,
  parameter int DIFFERENTIAL_DELAY2 = 1,
  parameter int SAMPLE_RATE_CHANGE2 = 2
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic signed [DIN_WIDTH-1:0]   din,
  input  logic [PHASE_WIDTH-1:0]        ftw,
  input  logic                          loadc,
  input  logic signed [COEFF_WIDTH-1:0] coeff,
  output logic                          rdy,
  output logic                          vld,
  output logic                          clko,
  output logic signed [DOUT_WIDTH-1:0]  iout,
  output logic signed [DOUT_WIDTH-1:0]  qout
);
  localparam int MW = 16;   // mixer output width (Fig. 24)
  localparam int D1 = SELECT_CIC1 ? SAMPLE_RATE_CHANGE1 : 1;
  localparam int D2 = SELECT_CIC2 ? SAMPLE_RATE_CHANGE2 : 1;
  localparam int DTOT = D1 * D2;
  localparam int DCW  = (DTOT > 1) ? $clog2(DTOT) : 1;

  // ---------------- NCO and quadrature mixer ----------------
  logic signed [DIN_WIDTH-1:0] din_d;
  logic nco_vld;
  logic signed [15:0] lo_cos, lo_sin;

  nco #(.PHASE_WIDTH(PHASE_WIDTH), .PHASE_DITHER_WIDTH(PHASE_DITHER_WIDTH),
        .LUT_ADDR(LUT_ADDR), .OUT_WIDTH(16)) u_nco (
    .clk, .rst, .en, .ftw, .vld(nco_vld), .cos_out(lo_cos), .sin_out(lo_sin));

  always_ff @(posedge clk) begin
    if (rst) din_d <= '0;
    else if (en) din_d <= din;
  end

  logic mix_vld;
  logic signed [MW-1:0] mix_i, mix_q;
  logic signed [DIN_WIDTH+16:0] pi_, pq;
  assign pi_ = (DIN_WIDTH+17)'(din_d) * (DIN_WIDTH+17)'(lo_cos);
  assign pq  = -((DIN_WIDTH+17)'(din_d) * (DIN_WIDTH+17)'(lo_sin));

  always_ff @(posedge clk) begin
    if (rst) begin
      mix_vld <= 1'b0; mix_i <= '0; mix_q <= '0;
    end else begin
      mix_vld <= nco_vld;
      if (nco_vld) begin
        mix_i <= pi_[DIN_WIDTH+14 -: MW];   // x * c / 2^15, MSB-aligned
        mix_q <= pq [DIN_WIDTH+14 -: MW];
      end
    end
  end

  // ---------------- CIC1 ----------------
  logic c1_vld;
  logic signed [CIC_WIDTH-1:0] c1_i, c1_q;
  if (SELECT_CIC1) begin : g_cic1
    logic vq;
    cic_decimator #(.DIN_WIDTH(MW), .DOUT_WIDTH(CIC_WIDTH), .STAGES(NUMBER_OF_STAGES1),
      .DIFF_DELAY(DIFFERENTIAL_DELAY1), .RATE(SAMPLE_RATE_CHANGE1)) u_ci (
      .clk, .rst, .en(mix_vld), .din(mix_i), .vld(c1_vld), .dout(c1_i));
    cic_decimator #(.DIN_WIDTH(MW), .DOUT_WIDTH(CIC_WIDTH), .STAGES(NUMBER_OF_STAGES1),
      .DIFF_DELAY(DIFFERENTIAL_DELAY1), .RATE(SAMPLE_RATE_CHANGE1)) u_cq (
      .clk, .rst, .en(mix_vld), .din(mix_q), .vld(vq), .dout(c1_q));
  end else begin : g_nocic1
    assign c1_vld = mix_vld;
    assign c1_i   = {mix_i, (CIC_WIDTH-MW)'(0)};
    assign c1_q   = {mix_q, (CIC_WIDTH-MW)'(0)};
  end

  // ---------------- compensating FIR ----------------
  logic cf_vld, cf_rdy;
  logic signed [DOUT_WIDTH-1:0] cf_i, cf_q;
  if (SELECT_CFIR) begin : g_cfir
    logic vq, rq;
    fir_core #(.DIN_WIDTH(CIC_WIDTH), .DOUT_WIDTH(DOUT_WIDTH), .COEFF_WIDTH(COEFF_WIDTH),
      .NUM_OF_TAPS(NUMBER_OF_TAPS), .COEFFS(COEFFS), .LATENCY(FIR_LATENCY),
      .INTERNAL_COEFFS(INTERNAL_COEFFS), .OUT_SHIFT(COEFF_WIDTH - 1 + CIC_WIDTH - DOUT_WIDTH)) u_fi (
      .clk, .rst, .en(c1_vld), .loadc, .coeff, .din(c1_i), .vld(cf_vld), .dout(cf_i), .rdy(cf_rdy));
    fir_core #(.DIN_WIDTH(CIC_WIDTH), .DOUT_WIDTH(DOUT_WIDTH), .COEFF_WIDTH(COEFF_WIDTH),
      .NUM_OF_TAPS(NUMBER_OF_TAPS), .COEFFS(COEFFS), .LATENCY(FIR_LATENCY),
      .INTERNAL_COEFFS(INTERNAL_COEFFS), .OUT_SHIFT(COEFF_WIDTH - 1 + CIC_WIDTH - DOUT_WIDTH)) u_fq (
      .clk, .rst, .en(c1_vld), .loadc, .coeff, .din(c1_q), .vld(vq), .dout(cf_q), .rdy(rq));
  end else begin : g_nocfir
    assign cf_vld = c1_vld;
    assign cf_rdy = 1'b1;
    assign cf_i   = c1_i[CIC_WIDTH-1 -: DOUT_WIDTH];
    assign cf_q   = c1_q[CIC_WIDTH-1 -: DOUT_WIDTH];
  end
  assign rdy = cf_rdy;

  // ---------------- CIC2 ----------------
  if (SELECT_CIC2) begin : g_cic2
    logic vq;
    cic_decimator #(.DIN_WIDTH(DOUT_WIDTH), .DOUT_WIDTH(DOUT_WIDTH), .STAGES(NUMBER_OF_STAGES2),
      .DIFF_DELAY(DIFFERENTIAL_DELAY2), .RATE(SAMPLE_RATE_CHANGE2)) u_ci (
      .clk, .rst, .en(cf_vld), .din(cf_i), .vld(vld), .dout(iout));
    cic_decimator #(.DIN_WIDTH(DOUT_WIDTH), .DOUT_WIDTH(DOUT_WIDTH), .STAGES(NUMBER_OF_STAGES2),
      .DIFF_DELAY(DIFFERENTIAL_DELAY2), .RATE(SAMPLE_RATE_CHANGE2)) u_cq (
      .clk, .rst, .en(cf_vld), .din(cf_q), .vld(vq), .dout(qout));
  end else begin : g_nocic2
    assign vld  = cf_vld;
    assign iout = cf_i;
    assign qout = cf_q;
  end

  // ---------------- output-rate clock ----------------
  logic [DCW-1:0] dcnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt <= '0; clko <= 1'b0;
    end else if (mix_vld) begin
      dcnt <= (dcnt == DCW'(DTOT - 1)) ? '0 : dcnt + 1'b1;
      clko <= (dcnt == DCW'(DTOT - 1)) || (dcnt < DCW'(DTOT / 2 - 1));
    end
  end
endmodule
