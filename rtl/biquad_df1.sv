// biquad_df1: one second-order IIR section in Direct Form I.
//   y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
// Coefficients are signed with COEFF_WIDTH-2 fraction bits (Q2.x), which
// covers |a1| < 2 as a stable section needs. The sum is kept at full
// precision, shifted right by the fraction bits, and saturated to the data
// width before it is fed back and sent on.
// Interface: en marks a valid input; vld pulses one clock later with y on
// dout. Coefficients are inputs so the surrounding core can load them.
// Direct Form I is the document's choice; the number format is this design's.
module biquad_df1 #(
  parameter int DATA_WIDTH  = 16,
  parameter int COEFF_WIDTH = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic signed [DATA_WIDTH-1:0]  din,
  input  logic signed [COEFF_WIDTH-1:0] b0, b1, b2, a1, a2,
  output logic                          vld,
  output logic signed [DATA_WIDTH-1:0]  dout
);
  localparam int FRAC = COEFF_WIDTH - 2;
  localparam int AW   = DATA_WIDTH + COEFF_WIDTH + 3;
  localparam logic signed [AW-1:0] YMAX = AW'((2 ** (DATA_WIDTH - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(2 ** (DATA_WIDTH - 1));

  logic signed [DATA_WIDTH-1:0] x1, x2, y1, y2;
  logic signed [AW-1:0] acc, acc_sh;
  logic signed [DATA_WIDTH-1:0] y;

  always_comb begin
    acc = AW'(b0) * AW'(din) + AW'(b1) * AW'(x1) + AW'(b2) * AW'(x2)
        - AW'(a1) * AW'(y1) - AW'(a2) * AW'(y2);
    acc_sh = acc >>> FRAC;
    if (acc_sh > YMAX)      y = YMAX[DATA_WIDTH-1:0];
    else if (acc_sh < YMIN) y = YMIN[DATA_WIDTH-1:0];
    else                    y = acc_sh[DATA_WIDTH-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; vld <= 1'b0;
    end else begin
      vld <= en;
      if (en) begin
        x1 <= din; x2 <= x1;
        y1 <= y;   y2 <= y1;
      end
    end
  end
  assign dout = y1;
endmodule
