// fft_bf1: type-I butterfly of a radix-2^2 single-path delay-feedback (SDF)
// FFT stage handling blocks of L points, with an L/2-word feedback delay line.
// For the first L/2 samples of a block (s = 0) the input is stored in the
// delay line while the line's oldest word (a difference left from the previous
// block) goes out. For the last L/2 samples (s = 1) the sum of the stored and
// the new sample goes out and their difference is stored.
// Interface: vin marks a valid sample; vout pulses one clock later. The local
// sample counter makes s, so the stage runs only on valid samples and gaps in
// the stream are allowed. Outputs start to be valid once the first sums leave.
// Each butterfly widens the data by one bit (Fig. 7 of the design).
module fft_bf1 #(
  parameter int W  = 16,   // input width; output is W+1
  parameter int LOG2L = 5  // log2 of the block length L
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                vin,
  input  logic signed [W-1:0] xr, xi,
  output logic                vout,
  output logic signed [W:0]   yr, yi
);
  localparam int D = 2 ** (LOG2L - 1);
  logic [LOG2L-1:0] cnt;
  logic signed [W:0] dr [D];
  logic signed [W:0] di [D];
  logic primed, s;
  logic signed [W:0] hr, hi, ar, ai;

  assign s  = cnt[LOG2L-1];
  assign hr = dr[D-1];
  assign hi = di[D-1];
  assign ar = (W+1)'(xr);
  assign ai = (W+1)'(xi);

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
