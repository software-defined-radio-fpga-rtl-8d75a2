// nco: numerically controlled oscillator producing a cosine/sine pair.
// A PHASE_WIDTH-bit accumulator adds the frequency tuning word FTW on every
// enabled clock, so f_out = FTW * f_clk / 2^PHASE_WIDTH. The top LUT_ADDR
// bits of the phase (plus, when PHASE_DITHER_WIDTH > 0, a pseudo-random value
// of that many bits from a 32-bit LFSR, which spreads the phase-truncation
// spurs) address cosine and sine tables of 2^LUT_ADDR entries that are
// computed at elaboration time (amplitude 2^(OUT_WIDTH-1)-1).
// Interface: en advances the phase; vld pulses one clock later with the
// samples for the phase held before that clock's increment.
// The NCO, its phase width and phase-dither generics come from the document;
// the table size, the 16-bit output (Fig. 9 prints 16) and the LFSR are this
// design's choices.
module nco
  import sdr_pkg::*;
#(
  parameter int PHASE_WIDTH        = 32,
  parameter int PHASE_DITHER_WIDTH = 0,
  parameter int LUT_ADDR           = 10,
  parameter int OUT_WIDTH          = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        en,
  input  logic [PHASE_WIDTH-1:0]      ftw,
  output logic                        vld,
  output logic signed [OUT_WIDTH-1:0] cos_out,
  output logic signed [OUT_WIDTH-1:0] sin_out
);
  localparam int L = 2 ** LUT_ADDR;
  typedef logic signed [OUT_WIDTH-1:0] lut_t [L];
  function automatic lut_t mk(input bit is_sin);
    lut_t r;
    for (int i = 0; i < L; i++)
      r[i] = OUT_WIDTH'(is_sin ? sin_q(i, L, OUT_WIDTH) : cos_q(i, L, OUT_WIDTH));
    return r;
  endfunction
  localparam lut_t COS_LUT = mk(1'b0);
  localparam lut_t SIN_LUT = mk(1'b1);

  logic [PHASE_WIDTH-1:0] phase, dphase;
  logic [31:0]            lfsr;
  logic [LUT_ADDR-1:0]    addr;

  always_comb begin
    dphase = phase;
    if (PHASE_DITHER_WIDTH > 0)
      dphase = phase + PHASE_WIDTH'(lfsr & ((32'd1 << PHASE_DITHER_WIDTH) - 32'd1));
  end
  assign addr = dphase[PHASE_WIDTH-1 -: LUT_ADDR];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0; lfsr <= 32'hACE1_2468; vld <= 1'b0; cos_out <= '0; sin_out <= '0;
    end else begin
      vld <= en;
      if (en) begin
        phase   <= phase + ftw;
        lfsr    <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
        cos_out <= COS_LUT[addr];
        sin_out <= SIN_LUT[addr];
      end
    end
  end
endmodule
