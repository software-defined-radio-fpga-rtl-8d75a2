// tb_sync_fifo: self-checking test of the synchronous FIFO.
// Random writes and reads (with phases biased towards filling and towards
// draining) are compared with a queue model: read data, empty, full and count
// are checked every clock, writes into a full FIFO must be dropped (also when a read happens in the same clock) and reads
// of an empty one ignored. Both the full and the empty condition must occur.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, rd_en, empty, full;
  logic [15:0] wr_data, rd_data;
  logic [3:0] count;
  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m [$];
    int saw_full = 0, saw_empty = 0, drops = 0, pw, pr;
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      pw = ((n / 200) % 2) ? 30 : 70;
      pr = 100 - pw;
      wr_en = ($urandom_range(0, 99) < pw);
      rd_en = ($urandom_range(0, 99) < pr);
      wr_data = 16'($urandom);
      #1;
      checks++;
      if (empty != (m.size() == 0) || full != (m.size() == 8) || int'(count) != m.size() ||
          (m.size() > 0 && rd_data != m[0])) begin
        failures++;
        if (failures < 10) $display("n=%0d model %0d dut count %0d e%0b f%0b", n, m.size(), count, empty, full);
      end
      if (full) saw_full++;
      if (empty) saw_empty++;
      @(posedge clk);
      // the full/empty flags before the edge decide (a write into a full
      // FIFO is dropped even when a read happens in the same clock)
      pw = m.size();
      if (rd_en && pw > 0) void'(m.pop_front());
      if (wr_en && pw < 8) m.push_back(wr_data);
      else if (wr_en) drops++;
      @(negedge clk);
    end
    checks += 2;
    if (saw_full == 0) begin failures++; $display("never full"); end
    if (saw_empty == 0) begin failures++; $display("never empty"); end
    $display("full %0d clocks, empty %0d clocks, %0d writes dropped", saw_full, saw_empty, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
