// wb_iir_ip: the IIR IP core - iir_sos behind the Wishbone slave control
// and its FIFOs (Fig. 2 and the IIR core figure of the design).
// Words written to the coefficient register are loaded into the filter one per
// clock (LOADC) as soon as they reach the head of the coefficient FIFO.
// While the control register's EN bit is set, the core is ready and the TX
// FIFO has room, one input sample per clock moves from the sample FIFO
// (low DATA_WIDTH bits of the word) into the filter, and every filter output
// is pushed, sign-extended to 32 bits, into the TX FIFO for the host to read.
// The control register's soft-reset bit resets the filter state and its
// coefficients (back to the generics).
// How FIFO words map onto the filter ports is this design's choice.
module wb_iir_ip
  import sdr_pkg::*;
#(
  parameter int DATA_WIDTH      = 16,
  parameter int COEFF_WIDTH     = 16,
  parameter int STAGES          = 6,
  parameter int COEFFS [5*STAGES] = '{default: 0},
  parameter bit INTERNAL_COEFFS = 1'b0,
  parameter int FIFO_DEPTH      = 64
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
  wb_ctrl_t ctrl;
  logic [31:0] slave_sel, ftw, coef_data, smp_data, tx_data;
  logic coef_valid, smp_valid, coef_pop, smp_pop, tx_push, core_rdy, core_rst;
  logic [CW-1:0] tx_count;
  logic f_vld;
  logic signed [DATA_WIDTH-1:0] f_dout;

  wb_slave_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_wb (
    .clk, .rst, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_we_i, .wb_stb_i, .wb_cyc_i, .wb_ack_o,
    .ctrl, .slave_sel, .ftw, .coef_valid, .coef_data, .coef_pop, .smp_valid, .smp_data,
    .smp_pop, .tx_push, .tx_data, .tx_count, .core_rdy);

  // keep room in the TX FIFO for the results still in flight
  assign core_rst = rst || ctrl.srst;
  assign coef_pop = coef_valid;
  assign smp_pop  = smp_valid && ctrl.en && core_rdy && !coef_valid &&
                    (tx_count < CW'(FIFO_DEPTH - 8));

  iir_sos #(.DIN_WIDTH(DATA_WIDTH), .DOUT_WIDTH(DATA_WIDTH), .COEFF_WIDTH(COEFF_WIDTH),
    .STAGES(STAGES), .COEFFS(COEFFS), .INTERNAL_COEFFS(INTERNAL_COEFFS)) u_core (
    .clk, .rst(core_rst), .en(smp_pop), .loadc(coef_pop), .coeff(COEFF_WIDTH'(coef_data)),
    .din(DATA_WIDTH'(smp_data)), .vld(f_vld), .dout(f_dout), .rdy(core_rdy));

  assign tx_push = f_vld;
  assign tx_data = 32'(f_dout);
endmodule
