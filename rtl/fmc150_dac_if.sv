// fmc150_dac_if: drive of the DAC3283 dual-channel 16-bit DAC on the FMC150
// card over its 8-line interleaved DDR bus.
// Each sample period carries four bytes: channel C high byte, C low byte,
// channel D high byte, D low byte. They leave one per clock of clk_fast
// (245.76 MHz from the FPGA's clock manager), and dac_dclk toggles on every
// clk_fast edge, so DAC_DATCLK runs at 122.88 MHz and every one of its edges
// carries a byte (DDR at 245.76 Mbps per line). That gives 61.44 MSPS per
// channel. dac_frame is high with the first byte of each sample, which tells
// the DAC where a sample starts. The channel inputs are taken when the byte
// counter wraps; they come from the 61.44 MHz sample clock, which the same
// clock manager derives in phase with clk_fast, so they are stable then.
// Rates, bus width and port names follow Fig. 10; the byte order, the frame
// pulse and the single-edge timing model of the DDR output are assumptions.
module fmc150_dac_if (
  input  logic        clk_fast,
  input  logic        rst,
  input  logic [15:0] dac_chc_din,
  input  logic [15:0] dac_chd_din,
  output logic [7:0]  dac_data,
  output logic        dac_dclk,
  output logic        dac_frame
);
  logic [1:0]  bcnt;
  logic [7:0]  c_q;
  logic [15:0] d_q;

  always_ff @(posedge clk_fast) begin
    if (rst) begin
      bcnt <= '0; c_q <= '0; d_q <= '0;
      dac_data <= '0; dac_dclk <= 1'b0; dac_frame <= 1'b0;
    end else begin
      bcnt     <= bcnt + 1'b1;
      dac_dclk <= ~dac_dclk;
      if (bcnt == 2'd0) begin
        c_q <= dac_chc_din[7:0];
        d_q <= dac_chd_din;
      end
      dac_frame <= (bcnt == 2'd0);
      unique case (bcnt)
        2'd0: dac_data <= dac_chc_din[15:8];
        2'd1: dac_data <= c_q[7:0];
        2'd2: dac_data <= d_q[15:8];
        default: dac_data <= d_q[7:0];
      endcase
    end
  end
endmodule
