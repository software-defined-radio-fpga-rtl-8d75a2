// fir_core: parallel FIR filter with four selectable structures.
//
// LATENCY (the structure generic) picks one of:
//   0 transposed direct form - every tap has its own coefficient and the
//     partial sums travel through a register chain;
//   1 odd-symmetric  - h[k] = -h[T-1-k]: input pairs are pre-subtracted, so
//     only M = floor(T/2) coefficients and multipliers are used;
//   2 even-symmetric - h[k] =  h[T-1-k]: input pairs are pre-added and
//     M = ceil(T/2) coefficients are used (the centre tap of an odd T alone);
//   3 moving average - running sum of the last T inputs times round(2^16/T),
//     no coefficients.
// Coefficients come either from the COEFFS generic (INTERNAL_COEFFS = 1,
// filtering starts right after reset) or are streamed in through COEFF while
// LOADC is high, one per clock, M of them, first tap first. Filtering does not
// start before the last one is in; RDY shows that the core is ready.
//
// Interface: EN marks a valid input sample on DIN. VLD pulses one clock
// later with the output on DOUT, so the latency is one clock and one sample
// per clock is accepted. The accumulator is full precision; the output is the
// accumulator shifted right by OUT_SHIFT (default COEFF_WIDTH-1, i.e. Q1.x
// coefficients) and saturated to DOUT_WIDTH.
//
// The structures, generics and the load-before-filter rule follow the
// document; the port RDY, the coefficient format, the output scaling and the
// one-clock latency are this design's choices.
module fir_core
  import sdr_pkg::*;
#(
  parameter int DIN_WIDTH       = 16,
  parameter int DOUT_WIDTH      = 16,
  parameter int COEFF_WIDTH     = 16,
  parameter int NUM_OF_TAPS     = 21,
  parameter int COEFFS [NUM_OF_TAPS] = CFIR_COEFFS,
  parameter int LATENCY         = 0,
  parameter bit INTERNAL_COEFFS = 1'b1,
  parameter int OUT_SHIFT       = COEFF_WIDTH - 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic                          loadc,
  input  logic signed [COEFF_WIDTH-1:0] coeff,
  input  logic signed [DIN_WIDTH-1:0]   din,
  output logic                          vld,
  output logic signed [DOUT_WIDTH-1:0]  dout,
  output logic                          rdy
);
  localparam int T   = NUM_OF_TAPS;
  localparam int M   = (LATENCY == 1) ? T / 2 : (LATENCY == 2) ? (T + 1) / 2 : T;
  localparam int IW  = (T > 1) ? $clog2(T) : 1;
  localparam int AW  = DIN_WIDTH + COEFF_WIDTH + 2 + $clog2(T + 1);
  localparam int MA_RECIP = (65536 + T / 2) / T;

  logic signed [COEFF_WIDTH-1:0] coef [T];
  logic signed [DIN_WIDTH-1:0]   xd   [T];   // xd[k] = x[n-1-k]
  logic signed [AW-1:0]          z    [T];   // transposed partial sums
  logic signed [AW-1:0]          ma_acc;
  logic [IW-1:0]                 ld_idx;
  logic signed [AW-1:0]          y_comb;
  logic signed [AW+17:0]         ma_scaled;
  logic signed [AW-1:0]          ma_next;
  logic                          go;

  assign go = en && rdy;

  // ---------------- coefficient store and loader ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ld_idx <= '0;
      rdy    <= (LATENCY == 3) || INTERNAL_COEFFS;
      for (int k = 0; k < T; k++) coef[k] <= COEFF_WIDTH'(COEFFS[k]);
    end else if (loadc && LATENCY != 3) begin
      coef[ld_idx] <= coeff;
      if (ld_idx == IW'(M - 1)) begin
        ld_idx <= '0;
        rdy    <= 1'b1;
      end else begin
        ld_idx <= ld_idx + 1'b1;
        rdy    <= 1'b0;
      end
    end
  end

  // ---------------- input delay line ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < T; k++) xd[k] <= '0;
    end else if (go) begin
      xd[0] <= din;
      for (int k = 1; k < T; k++) xd[k] <= xd[k-1];
    end
  end

  // x[n-k] seen from the current input
  function automatic logic signed [DIN_WIDTH-1:0] xs(input int k);
    return (k == 0) ? din : xd[k-1];
  endfunction

  // ---------------- structure datapaths ----------------
  always_comb begin
    y_comb    = '0;
    ma_scaled = '0;
    ma_next   = '0;
    unique case (LATENCY)
      1, 2: begin
        for (int k = 0; k < T / 2; k++) begin
          if (LATENCY == 1)
            y_comb += AW'(coef[k]) * (AW'(xs(k)) - AW'(xs(T - 1 - k)));
          else
            y_comb += AW'(coef[k]) * (AW'(xs(k)) + AW'(xs(T - 1 - k)));
        end
        if (LATENCY == 2 && (T % 2) == 1)
          y_comb += AW'(coef[M-1]) * AW'(xs(M - 1));
      end
      3: begin
        ma_next   = ma_acc + AW'(din) - AW'(xd[T-1]);
        ma_scaled = (AW+18)'(ma_next) * (AW+18)'(MA_RECIP);
        y_comb    = AW'(ma_scaled >>> 16);
      end
      default: begin
        y_comb = AW'(coef[0]) * AW'(din) + ((T > 1) ? z[1 % T] : AW'(0));
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < T; k++) z[k] <= '0;
      ma_acc <= '0;
    end else if (go) begin
      for (int k = 1; k < T; k++)
        z[k] <= AW'(coef[k]) * AW'(din) + ((k + 1 < T) ? z[(k + 1) % T] : AW'(0));
      ma_acc <= ma_acc + AW'(din) - AW'(xd[T-1]);
    end
  end

  // ---------------- output scaling and saturation ----------------
  localparam logic signed [AW-1:0] OMAX = AW'((2 ** (DOUT_WIDTH - 1)) - 1);
  localparam logic signed [AW-1:0] OMIN = -AW'(2 ** (DOUT_WIDTH - 1));
  logic signed [AW-1:0] y_sh;
  assign y_sh = (LATENCY == 3) ? y_comb : (y_comb >>> OUT_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      vld  <= 1'b0;
      dout <= '0;
    end else begin
      vld <= go;
      if (go) begin
        if (y_sh > OMAX)      dout <= OMAX[DOUT_WIDTH-1:0];
        else if (y_sh < OMIN) dout <= OMIN[DOUT_WIDTH-1:0];
        else                  dout <= y_sh[DOUT_WIDTH-1:0];
      end
    end
  end
endmodule
