// cic_decimator: cascaded integrator-comb decimation filter, multiplier-free.
// STAGES integrators run at the input rate; every RATE-th sample the last
// integrator is passed to STAGES comb sections (differential delay
// DIFF_DELAY) at the output rate. The internal width is
// DIN_WIDTH + STAGES*ceil(log2(RATE*DIFF_DELAY)) bits, so wrap-around in the
// integrators cancels in the combs. The filter's DC gain (RATE*DIFF_DELAY)^STAGES
// is removed by keeping the top DOUT_WIDTH bits of that width; with a
// power-of-two RATE*DIFF_DELAY this is an exact division, so a full-scale
// input gives a full-scale output.
// Interface: en marks a valid input; vld pulses one clock after every
// RATE-th accepted input, with the result on dout.
// The CIC and its three generics are the document's; the output scaling and
// timing are this design's choices.
module cic_decimator #(
  parameter int DIN_WIDTH  = 16,
  parameter int DOUT_WIDTH = 32,
  parameter int STAGES     = 10,
  parameter int DIFF_DELAY = 1,
  parameter int RATE       = 128
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic signed [DIN_WIDTH-1:0]  din,
  output logic                         vld,
  output logic signed [DOUT_WIDTH-1:0] dout
);
  localparam int GROWTH = STAGES * $clog2(RATE * DIFF_DELAY);
  localparam int B      = DIN_WIDTH + GROWTH;
  localparam int CW     = (RATE > 1) ? $clog2(RATE) : 1;

  logic signed [B-1:0] integ [STAGES];
  logic signed [B-1:0] cdel  [STAGES][DIFF_DELAY];
  logic signed [B-1:0] comb  [STAGES+1];
  logic [CW-1:0] cnt;
  logic dec;
  // output: the top DOUT_WIDTH bits (zero-filled below when DOUT_WIDTH > B)
  logic signed [B+DOUT_WIDTH-1:0] ext;
  assign ext = {comb[STAGES], DOUT_WIDTH'(0)};

  assign dec = en && (cnt == CW'(RATE - 1));

  // comb chain evaluated on the decimated sample
  always_comb begin
    comb[0] = integ[STAGES-1];
    for (int s = 0; s < STAGES; s++)
      comb[s+1] = comb[s] - cdel[s][DIFF_DELAY-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; vld <= 1'b0; dout <= '0;
      for (int s = 0; s < STAGES; s++) begin
        integ[s] <= '0;
        for (int d = 0; d < DIFF_DELAY; d++) cdel[s][d] <= '0;
      end
    end else begin
      vld <= dec;
      if (en) begin
        integ[0] <= integ[0] + B'(din);
        for (int s = 1; s < STAGES; s++) integ[s] <= integ[s] + integ[s-1];
        cnt <= dec ? '0 : cnt + 1'b1;
      end
      if (dec) begin
        for (int s = 0; s < STAGES; s++) begin
          cdel[s][0] <= comb[s];
          for (int d = 1; d < DIFF_DELAY; d++) cdel[s][d] <= cdel[s][d-1];
        end
        dout <= ext[B+DOUT_WIDTH-1 -: DOUT_WIDTH];
      end
    end
  end
endmodule
