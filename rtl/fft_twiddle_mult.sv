// fft_twiddle_mult: twiddle-factor ROM plus complex multiplier that closes a
// radix-2^2 SDF stage of block length L.
// A local counter n (0..L-1) follows the samples of a block. Writing
// n = (L/2) b1 + (L/4) b2 + n3, the sample is multiplied by W_L^e with
// e = n3 * (b1 + 2 b2) and W_L = exp(-j 2 pi / L) (conjugated when inv is
// set, for the inverse transform). The ROM holds the L values W_L^e,
// e = 0..L-1, with TF_WIDTH-bit signed parts scaled by 2^(TF_WIDTH-1)-1;
// it is computed at elaboration time. The product is rounded and scaled back
// by 2^(TF_WIDTH-1), so the data width does not change (as in Fig. 7).
// Interface: vin marks a valid sample; vout pulses one clock later.
module fft_twiddle_mult
  import sdr_pkg::*;
#(
  parameter int W        = 18,
  parameter int LOG2L    = 5,
  parameter int TF_WIDTH = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                inv,
  input  logic                vin,
  input  logic signed [W-1:0] xr, xi,
  output logic                vout,
  output logic signed [W-1:0] yr, yi
);
  localparam int L = 2 ** LOG2L;
  typedef logic signed [TF_WIDTH-1:0] rom_t [L];

  function automatic rom_t mk_cos();
    rom_t r;
    for (int e = 0; e < L; e++) r[e] = TF_WIDTH'(cos_q(e, L, TF_WIDTH));
    return r;
  endfunction
  function automatic rom_t mk_sin();
    rom_t r;
    for (int e = 0; e < L; e++) r[e] = TF_WIDTH'(sin_q(e, L, TF_WIDTH));
    return r;
  endfunction
  localparam rom_t ROM_COS = mk_cos();
  localparam rom_t ROM_SIN = mk_sin();

  localparam int PW = W + TF_WIDTH + 1;
  logic [LOG2L-1:0] cnt;
  logic [LOG2L-1:0] e;
  logic [LOG2L-3:0] n3;
  logic [1:0]       q;
  logic signed [TF_WIDTH-1:0] wr, wi;
  logic signed [PW-1:0] pr, pi_;

  assign n3 = cnt[LOG2L-3:0];
  assign q  = {cnt[LOG2L-2], cnt[LOG2L-1]};          // b1 + 2*b2
  assign e  = LOG2L'(n3 * q);
  assign wr = ROM_COS[e];
  // exp(-j theta) = cos - j sin ; inverse uses exp(+j theta)
  assign wi = inv ? ROM_SIN[e] : -ROM_SIN[e];

  always_comb begin
    pr  = PW'(xr) * PW'(wr) - PW'(xi) * PW'(wi);
    pi_ = PW'(xr) * PW'(wi) + PW'(xi) * PW'(wr);
  end

  localparam logic signed [PW-1:0] RND = PW'(1) <<< (TF_WIDTH - 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; vout <= 1'b0; yr <= '0; yi <= '0;
    end else begin
      vout <= vin;
      if (vin) begin
        cnt <= cnt + 1'b1;
        yr  <= W'((pr  + RND) >>> (TF_WIDTH - 1));
        yi  <= W'((pi_ + RND) >>> (TF_WIDTH - 1));
      end
    end
  end
endmodule
