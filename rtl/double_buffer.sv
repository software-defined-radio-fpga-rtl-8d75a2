// double_buffer: length-N ping-pong buffer that turns a slow stream of DDC
// samples into whole UDP payloads (Fig. 26 of the design).
// The producer writes samples into one buffer (wr_clk domain) while the
// consumer reads the other (rd_clk domain). When the write buffer holds N
// samples the roles swap: the full buffer is announced to the read side by a
// toggle passed through a two-flop synchroniser, and the read side then sends
// the N words out as one burst (out_vld for N consecutive clocks, out_first on
// word 0, out_last on word N-1), which is one packet. Because a buffer is only
// read after it is complete and is not written again until N more samples
// have arrived in the other one, reader and writer never touch the same
// words as long as a burst (N rd_clk clocks) is shorter than filling a buffer.
// If a new buffer is announced while a burst is still running, overruns
// counts it (the announced buffer is then sent right after the current one;
// an announcement in the last word of a burst is not an overrun).
// N = 33 and 32-bit words (16-bit I, 16-bit Q) follow the document; using the
// buffer as the clock-domain crossing is this design's choice.
module double_buffer #(
  parameter int N     = 33,
  parameter int WIDTH = 32
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst,
  output logic             out_vld,
  output logic             out_first,
  output logic             out_last,
  output logic [WIDTH-1:0] out_data,
  output logic [15:0]      packets,
  output logic [15:0]      overruns
);
  localparam int AW = $clog2(N);

  logic [WIDTH-1:0] mem [2][N];

  // ---------------- write side ----------------
  logic          wsel, wtgl;
  logic [AW-1:0] wcnt;
  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wsel][wcnt] <= wr_data;
  end
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wsel <= 1'b0; wcnt <= '0; wtgl <= 1'b0;
    end else if (wr_en) begin
      if (wcnt == AW'(N - 1)) begin
        wcnt <= '0;
        wsel <= ~wsel;          // switch buffer
        wtgl <= ~wtgl;          // announce the full one
      end else begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  // ---------------- read side ----------------
  logic [2:0]    sync;
  logic          rsel, busy, pend;
  logic [AW-1:0] rcnt;
  logic          new_buf;

  assign new_buf = sync[2] ^ sync[1];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      sync <= '0; rsel <= 1'b0; busy <= 1'b0; pend <= 1'b0; rcnt <= '0;
      out_vld <= 1'b0; out_first <= 1'b0; out_last <= 1'b0; out_data <= '0;
      packets <= '0; overruns <= '0;
    end else begin
      sync      <= {sync[1:0], wtgl};
      out_vld   <= busy;
      out_first <= busy && rcnt == '0;
      out_last  <= busy && rcnt == AW'(N - 1);
      if (busy) out_data <= mem[rsel][rcnt];
      if (new_buf) begin
        if (busy && rcnt != AW'(N - 1)) begin
          overruns <= overruns + 1'b1;   // previous burst still running
          pend     <= 1'b1;
        end else begin
          busy <= 1'b1;
          rcnt <= '0;
        end
      end
      if (busy) begin
        if (rcnt == AW'(N - 1)) begin
          rcnt    <= '0;
          rsel    <= ~rsel;
          packets <= packets + 1'b1;
          busy    <= pend || new_buf;
          pend    <= 1'b0;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
