// tb_wb_slave_ctrl: self-checking test of the Wishbone slave register file
// and FIFOs.
// A bus-master task drives classic single cycles (CYC/STB held until ACK) and
// checks that ACK comes exactly one clock after the request and lasts one
// clock. The test writes and reads back the slave-select, control and FTW
// registers; fills the coefficient FIFO past full (the extra word must be
// dropped and the status bit set) and lets the core side pop it, checking
// order; streams input samples to the core side; has the core push results
// and reads them back through the output register, including a read of the
// empty FIFO, which must return 0; and checks the status word on the way.
module tb_wb_slave_ctrl;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]  wb_adr_i;
  logic [31:0] wb_dat_i, wb_dat_o;
  logic wb_we_i, wb_stb_i, wb_cyc_i, wb_ack_o;
  wb_ctrl_t ctrl;
  logic [31:0] slave_sel, ftw, coef_data, smp_data, tx_data;
  logic coef_valid, coef_pop, smp_valid, smp_pop, tx_push, core_rdy;
  logic [4:0] tx_count;
  wb_slave_ctrl #(.FIFO_DEPTH(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input logic we, input logic [2:0] adr, input logic [31:0] wd, output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = adr; wb_dat_i = wd;
    do begin @(posedge clk); #1; n++; end while (!wb_ack_o && n < 10);
    checks++;
    if (n != 1) begin failures++; $display("ACK after %0d clocks", n); end
    rd = wb_dat_o;
    // the master sees ACK at the next rising edge and ends the cycle there
    @(posedge clk);
    #1;
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
    checks++;
    if (wb_ack_o) begin failures++; $display("ACK longer than one clock"); end
  endtask

  task automatic wr(input logic [2:0] adr, input logic [31:0] d);
    logic [31:0] dummy;
    bus(1'b1, adr, d, dummy);
  endtask

  task automatic rd_check(input logic [2:0] adr, input logic [31:0] want, input string what);
    logic [31:0] r;
    bus(1'b0, adr, 32'd0, r);
    checks++;
    if (r !== want) begin failures++; $display("%s: read %h want %h", what, r, want); end
  endtask

  function automatic logic [31:0] st(input bit rxe, rxf, txe, txf, cf, rdy, input int cnt);
    wb_status_t s;
    s = '0;
    s.rx_empty = rxe; s.rx_full = rxf; s.tx_empty = txe; s.tx_full = txf;
    s.coef_full = cf; s.core_rdy = rdy; s.tx_count = 16'(cnt);
    return s;
  endfunction

  initial begin
    logic [31:0] c [$];
    wb_adr_i = 0; wb_dat_i = 0; wb_we_i = 0; wb_stb_i = 0; wb_cyc_i = 0;
    coef_pop = 0; smp_pop = 0; tx_push = 0; tx_data = 0; core_rdy = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // registers
    wr(WB_SLAVE_SEL, 32'h0000_0002);  rd_check(WB_SLAVE_SEL, 32'h2, "slave select");
    wr(WB_CONTROL, 32'h0000_0005);    rd_check(WB_CONTROL, 32'h5, "control");
    checks++;
    if (!ctrl.en || ctrl.srst || !ctrl.mode || slave_sel != 2) begin failures++; $display("control fields"); end
    wr(WB_FTW, 32'h1234_5678);        rd_check(WB_FTW, 32'h1234_5678, "ftw");
    checks++;
    if (ftw != 32'h1234_5678) failures++;
    rd_check(WB_STATUS, st(1, 0, 1, 0, 0, 0, 0), "status after reset");
    // coefficient FIFO: 17 writes into 16 places
    for (int k = 0; k < 17; k++) begin
      logic [31:0] v = $urandom;
      wr(WB_COEFF, v);
      if (k < 16) c.push_back(v);
    end
    core_rdy = 1;
    rd_check(WB_STATUS, st(1, 0, 1, 0, 1, 1, 0), "status with coefficient FIFO full");
    // core pops them
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      checks++;
      if (!coef_valid || coef_data != c[k]) begin failures++; $display("coefficient %0d", k); end
      coef_pop = 1;
      @(negedge clk) coef_pop = 0;
    end
    #1;
    checks++;
    if (coef_valid) begin failures++; $display("dropped coefficient was stored"); end
    // input samples
    for (int k = 0; k < 5; k++) wr(WB_INPUT, 32'(100 + k));
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      checks++;
      if (!smp_valid || smp_data != 32'(100 + k)) begin failures++; $display("sample %0d", k); end
      smp_pop = 1;
      @(negedge clk) smp_pop = 0;
    end
    // results from the core
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) begin tx_push = 1; tx_data = 32'(7000 + k); end
    end
    @(negedge clk) tx_push = 0;
    rd_check(WB_STATUS, st(1, 0, 0, 0, 0, 1, 3), "status with three results");
    for (int k = 0; k < 3; k++) rd_check(WB_OUTPUT, 32'(7000 + k), "output sample");
    rd_check(WB_OUTPUT, 32'd0, "read of empty output FIFO");
    rd_check(3'd7, 32'd0, "unused address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
