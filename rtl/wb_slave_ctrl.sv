// wb_slave_ctrl: Wishbone (classic, B3) slave side shared by the DSP IP
// cores: the register file, the slave control logic and the FIFOs that sit
// between the bus and the core (Fig. 2 of the design).
//
// Registers (32-bit, word addresses, see sdr_pkg::wb_reg_e): slave select,
// status, control, coefficient, input sample, output sample and FTW. A write
// to the coefficient or input-sample register pushes the word into the
// coefficient RX FIFO or the sample RX FIFO; a read of the output-sample
// register pops the TX FIFO. A push into a full FIFO is dropped and a read of
// an empty TX FIFO returns 0. Every access is acknowledged one clock after
// CYC and STB rise (ACK drops again the next clock), with no wait states.
//
// Core side: the RX FIFOs present their oldest word with a *_valid flag and
// are popped with *_pop; the core pushes results with tx_push.
// The register names and the FIFO arrangement follow the figures of the
// document; the addresses, bit fields, FIFO depth and bus timing are this
// design's choices (the document names the registers only).
module wb_slave_ctrl
  import sdr_pkg::*;
#(
  parameter int FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  // Wishbone slave
  input  logic [2:0]  wb_adr_i,
  input  logic [31:0] wb_dat_i,
  output logic [31:0] wb_dat_o,
  input  logic        wb_we_i,
  input  logic        wb_stb_i,
  input  logic        wb_cyc_i,
  output logic        wb_ack_o,
  // core side
  output wb_ctrl_t    ctrl,
  output logic [31:0] slave_sel,
  output logic [31:0] ftw,
  output logic        coef_valid,
  output logic [31:0] coef_data,
  input  logic        coef_pop,
  output logic        smp_valid,
  output logic [31:0] smp_data,
  input  logic        smp_pop,
  input  logic        tx_push,
  input  logic [31:0] tx_data,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] tx_count,
  input  logic        core_rdy
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);
  logic req, wr, rd;
  logic c_empty, c_full, s_empty, s_full, t_empty, t_full;
  logic [CW-1:0] c_cnt, s_cnt;
  logic [31:0] t_data;
  wb_status_t status;

  assign req = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign wr  = req && wb_we_i;
  assign rd  = req && !wb_we_i;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_coef (
    .clk, .rst, .wr_en(wr && wb_adr_i == WB_COEFF), .wr_data(wb_dat_i),
    .rd_en(coef_pop), .rd_data(coef_data), .empty(c_empty), .full(c_full), .count(c_cnt));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rx (
    .clk, .rst, .wr_en(wr && wb_adr_i == WB_INPUT), .wr_data(wb_dat_i),
    .rd_en(smp_pop), .rd_data(smp_data), .empty(s_empty), .full(s_full), .count(s_cnt));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_tx (
    .clk, .rst, .wr_en(tx_push), .wr_data(tx_data),
    .rd_en(rd && wb_adr_i == WB_OUTPUT), .rd_data(t_data), .empty(t_empty), .full(t_full),
    .count(tx_count));

  assign coef_valid = !c_empty;
  assign smp_valid  = !s_empty;

  always_comb begin
    status = '0;
    status.rx_empty  = s_empty;
    status.rx_full   = s_full;
    status.tx_empty  = t_empty;
    status.tx_full   = t_full;
    status.coef_full = c_full;
    status.core_rdy  = core_rdy;
    status.tx_count  = 16'(tx_count);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_ack_o  <= 1'b0;
      wb_dat_o  <= '0;
      ctrl      <= '0;
      slave_sel <= '0;
      ftw       <= '0;
    end else begin
      wb_ack_o <= req;
      if (wr) begin
        unique case (wb_adr_i)
          WB_SLAVE_SEL: slave_sel <= wb_dat_i;
          WB_CONTROL:   ctrl      <= wb_ctrl_t'(wb_dat_i);
          WB_FTW:       ftw       <= wb_dat_i;
          default: ;
        endcase
      end
      if (rd) begin
        unique case (wb_adr_i)
          WB_SLAVE_SEL: wb_dat_o <= slave_sel;
          WB_STATUS:    wb_dat_o <= status;
          WB_CONTROL:   wb_dat_o <= ctrl;
          WB_OUTPUT:    wb_dat_o <= t_empty ? '0 : t_data;
          WB_FTW:       wb_dat_o <= ftw;
          default:      wb_dat_o <= '0;
        endcase
      end
    end
  end

  // Wishbone rule: ACK only answers a cycle in progress
  a_ack_in_cycle: assert property (@(posedge clk) disable iff (rst) wb_ack_o |-> wb_cyc_i);
endmodule
