// wb_fft_ip: the FFT/IFFT IP core - fft_r22sdf behind the Wishbone slave
// control and its FIFOs (Fig. 2 and Fig. 6 of the design).
// An input-sample word carries one complex sample: real part in bits 15:0,
// imaginary part in bits 31:16. While the control register's EN bit is set,
// samples move from the RX FIFO into the FFT at most every other clock, and
// every FFT output (bit-reversed order, DIN_WIDTH+N bits per part) is pushed
// into the TX FIFO as two sign-extended words, real part first. The control
// register's mode bit selects the inverse transform; its soft-reset bit
// empties the pipeline. The word packing and pacing are this design's choices.
module wb_fft_ip
  import sdr_pkg::*;
#(
  parameter int N          = 10,
  parameter int DIN_WIDTH  = 16,
  parameter int TF_WIDTH   = 16,
  parameter int FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  wb_adr_i,
  input  logic [31:0] wb_dat_i,
  output logic [31:0] wb_dat_o,
  input  logic        wb_we_i,
  input  logic        wb_stb_i,
  input  logic        wb_cyc_i,
  output logic        wb_ack_o
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);
  localparam int OW = DIN_WIDTH + N;
  wb_ctrl_t ctrl;
  logic [31:0] slave_sel, ftw, coef_data, smp_data, tx_data;
  logic coef_valid, smp_valid, smp_pop, tx_push, core_rst, pace;
  logic [CW-1:0] tx_count;
  logic f_vld, im_pending;
  logic signed [OW-1:0] f_r, f_i, im_hold;

  wb_slave_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_wb (
    .clk, .rst, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_we_i, .wb_stb_i, .wb_cyc_i, .wb_ack_o,
    .ctrl, .slave_sel, .ftw, .coef_valid, .coef_data, .coef_pop(coef_valid), .smp_valid,
    .smp_data, .smp_pop, .tx_push, .tx_data, .tx_count, .core_rdy(1'b1));

  assign core_rst = rst || ctrl.srst;
  assign smp_pop  = smp_valid && ctrl.en && !pace && (tx_count < CW'(FIFO_DEPTH - 16));

  fft_r22sdf #(.N(N), .DIN_WIDTH(DIN_WIDTH), .TF_WIDTH(TF_WIDTH)) u_core (
    .clk, .rst(core_rst), .en(smp_pop), .inv(ctrl.mode),
    .xsr(DIN_WIDTH'(smp_data[15:0])), .xsi(DIN_WIDTH'(smp_data[31:16])),
    .vld(f_vld), .xkr(f_r), .xki(f_i));

  always_ff @(posedge clk) begin
    if (core_rst) begin
      pace <= 1'b0; im_pending <= 1'b0; im_hold <= '0;
    end else begin
      pace       <= smp_pop;
      im_pending <= f_vld;
      if (f_vld) im_hold <= f_i;
    end
  end

  assign tx_push = f_vld || im_pending;
  assign tx_data = f_vld ? 32'(f_r) : 32'(im_hold);
endmodule
