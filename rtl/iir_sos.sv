// iir_sos: IIR filter built as a cascade of STAGES Direct-Form-I biquads
// (second-order sections), so high orders avoid coefficient sensitivity.
//
// Each section has five coefficients b0 b1 b2 a1 a2 (Q2.x, see biquad_df1).
// They come from the COEFFS generic at reset (INTERNAL_COEFFS = 1), or are
// streamed in through COEFF while LOADC is high, one per clock, in the order
// b0 b1 b2 a1 a2 of section 0, then section 1, and so on. Filtering waits
// until the 5*STAGES coefficients are in; RDY shows that.
//
// Interface: EN marks a valid sample on DIN; the result appears on DOUT with
// VLD after STAGES clocks (one register per section). The input is
// sign-extended or truncated to DOUT_WIDTH, the internal data width.
// The SOS cascade of DF-I biquads and the generics follow the document; the
// load order and number format are this design's. By default the core waits
// for its coefficients to be loaded, since the document gives no values.
module iir_sos #(
  parameter int DIN_WIDTH       = 16,
  parameter int DOUT_WIDTH      = 16,
  parameter int COEFF_WIDTH     = 16,
  parameter int STAGES          = 6,
  parameter int COEFFS [5*STAGES] = '{default: 0},
  parameter bit INTERNAL_COEFFS = 1'b0
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
  localparam int NC = 5 * STAGES;
  localparam int IW = $clog2(NC);

  logic signed [COEFF_WIDTH-1:0] c [NC];
  logic [IW-1:0] ld_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      ld_idx <= '0;
      rdy    <= INTERNAL_COEFFS;
      for (int k = 0; k < NC; k++) c[k] <= COEFF_WIDTH'(COEFFS[k]);
    end else if (loadc) begin
      c[ld_idx] <= coeff;
      if (ld_idx == IW'(NC - 1)) begin
        ld_idx <= '0;
        rdy    <= 1'b1;
      end else begin
        ld_idx <= ld_idx + 1'b1;
        rdy    <= 1'b0;
      end
    end
  end

  logic                         sv [STAGES+1];
  logic signed [DOUT_WIDTH-1:0] sd [STAGES+1];

  assign sv[0] = en && rdy;
  assign sd[0] = DOUT_WIDTH'(din);

  for (genvar s = 0; s < STAGES; s++) begin : g_sec
    biquad_df1 #(.DATA_WIDTH(DOUT_WIDTH), .COEFF_WIDTH(COEFF_WIDTH)) u_bq (
      .clk, .rst, .en(sv[s]), .din(sd[s]),
      .b0(c[5*s]), .b1(c[5*s+1]), .b2(c[5*s+2]), .a1(c[5*s+3]), .a2(c[5*s+4]),
      .vld(sv[s+1]), .dout(sd[s+1]));
  end

  assign vld  = sv[STAGES];
  assign dout = sd[STAGES];
endmodule
