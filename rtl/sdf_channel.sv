// sdf_channel: FIFO channel between two actors of a synchronous-dataflow (SDF)
// graph, as generated for the FM receiver's dataflow description.
// The producer writes PRD_RATE tokens per firing and the consumer takes
// CNS_RATE tokens per firing; DEPTH words of storage, INIT_DLY initial tokens
// (zeros) present after reset. can_put is high when PRD_RATE more tokens fit
// and can_fire when at least CNS_RATE tokens are waiting, which are the SDF
// firing rules for the two sides. Tokens move one per clock (wr_en/rd_en);
// rd_data shows the oldest token.
// The generic names and the example values (DEPTH 18, rates 1 and 16) are
// the document's; the ports and the flags are this design's.
module sdf_channel #(
  parameter int DATA_BITS = 32,
  parameter int DEPTH     = 18,
  parameter int PRD_RATE  = 1,
  parameter int CNS_RATE  = 16,
  parameter int INIT_DLY  = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 wr_en,
  input  logic [DATA_BITS-1:0] wr_data,
  input  logic                 rd_en,
  output logic [DATA_BITS-1:0] rd_data,
  output logic                 can_put,
  output logic                 can_fire,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);
  logic [DATA_BITS-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign do_wr    = wr_en && (count != CW'(DEPTH));
  assign do_rd    = rd_en && (count != '0);
  assign rd_data  = mem[rp];
  assign can_put  = (32'(count) + PRD_RATE) <= DEPTH;
  assign can_fire = 32'(count) >= CNS_RATE;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;   // initial tokens are zeros
    end else if (do_wr) begin
      mem[wp] <= wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rp <= '0; wp <= AW'(INIT_DLY % DEPTH); count <= CW'(INIT_DLY);
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  initial assert (INIT_DLY <= DEPTH && PRD_RATE <= DEPTH && CNS_RATE <= DEPTH);
endmodule
