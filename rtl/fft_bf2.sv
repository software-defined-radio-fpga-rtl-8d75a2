// fft_bf2: type-II butterfly of a radix-2^2 SDF FFT stage with block length L
// and an L/4-word feedback delay line. It works like fft_bf1 over quarter
// blocks (control bit s), and in the last quarter of each block (control bit
// t set, s set) multiplies the incoming sample by -j (by +j when inv is set,
// for the inverse transform), which is the trivial twiddle of radix 2^2.
// Interface: vin marks a valid sample; vout pulses one clock later; the output
// is one bit wider than the input.
module fft_bf2 #(
  parameter int W  = 17,
  parameter int LOG2L = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                inv,
  input  logic                vin,
  input  logic signed [W-1:0] xr, xi,
  output logic                vout,
  output logic signed [W:0]   yr, yi
);
  localparam int D = 2 ** (LOG2L - 2);
  logic [LOG2L-1:0] cnt;
  logic signed [W:0] dr [D];
  logic signed [W:0] di [D];
  logic primed, s, t;
  logic signed [W:0] hr, hi, ar, ai;

  assign t  = cnt[LOG2L-1];
  assign s  = cnt[LOG2L-2];
  assign hr = dr[D-1];
  assign hi = di[D-1];

  always_comb begin
    if (t && s) begin
      // -j*(xr + j xi) = xi - j xr ; +j*(xr + j xi) = -xi + j xr
      ar = inv ? -(W+1)'(xi) :  (W+1)'(xi);
      ai = inv ?  (W+1)'(xr) : -(W+1)'(xr);
    end else begin
      ar = (W+1)'(xr);
      ai = (W+1)'(xi);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; primed <= 1'b0; vout <= 1'b0; yr <= '0; yi <= '0;
      for (int k = 0; k < D; k++) begin dr[k] <= '0; di[k] <= '0; end
    end else begin
      vout <= vin && (primed || s);
      if (vin) begin
        cnt <= cnt + 1'b1;
        if (s) primed <= 1'b1;
        for (int k = 1; k < D; k++) begin dr[k] <= dr[k-1]; di[k] <= di[k-1]; end
        if (!s) begin
          dr[0] <= ar;      di[0] <= ai;
          yr    <= hr;      yi    <= hi;
        end else begin
          dr[0] <= hr - ar; di[0] <= hi - ai;
          yr    <= hr + ar; yi    <= hi + ai;
        end
      end
    end
  end
endmodule
