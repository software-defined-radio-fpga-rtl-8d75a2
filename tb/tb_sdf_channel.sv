// tb_sdf_channel: self-checking test of the SDF channel FIFO.
// u0 has the default rates (producer 1, consumer 16, depth 18, no initial
// tokens); u1 has 3 initial tokens. A producer writes a counting sequence
// whenever can_put allows (at random), and a consumer fires - reads
// CNS_RATE tokens back to back - whenever can_fire is high. A queue model
// (with the initial zero tokens) checks every token read, count, can_put and
// can_fire each clock. Both channels must fill up (can_put low) and fire.
module tb_sdf_channel;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] wr_en, rd_en, can_put, can_fire;
  logic [31:0] wr_data [2], rd_data [2];
  logic [4:0] count [2];
  sdf_channel u0 (.clk, .rst, .wr_en(wr_en[0]), .wr_data(wr_data[0]), .rd_en(rd_en[0]),
                  .rd_data(rd_data[0]), .can_put(can_put[0]), .can_fire(can_fire[0]), .count(count[0]));
  sdf_channel #(.INIT_DLY(3)) u1 (.clk, .rst, .wr_en(wr_en[1]), .wr_data(wr_data[1]), .rd_en(rd_en[1]),
                  .rd_data(rd_data[1]), .can_put(can_put[1]), .can_fire(can_fire[1]), .count(count[1]));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m [2][$];
  int seq [2], left [2], fires [2], blocked [2];

  initial begin
    wr_en = 0; rd_en = 0; wr_data[0] = 0; wr_data[1] = 0;
    for (int c = 0; c < 2; c++) begin
      seq[c] = 1; left[c] = 0; fires[c] = 0; blocked[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (3) m[1].push_back(32'd0);
    for (int n = 0; n < 4000; n++) begin
      #1;
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (int'(count[c]) != m[c].size() || can_put[c] != (m[c].size() + 1 <= 18) ||
            can_fire[c] != (m[c].size() >= 16)) begin
          failures++;
          if (failures < 10) $display("c%0d n=%0d count %0d model %0d", c, n, count[c], m[c].size());
        end
        if (!can_put[c]) blocked[c]++;
        // consumer: start a firing of 16 reads when allowed
        if (left[c] == 0 && can_fire[c] && $urandom_range(0, 3) == 0) begin
          left[c] = 16; fires[c]++;
        end
        rd_en[c] = (left[c] > 0);
        if (rd_en[c]) begin
          checks++;
          if (rd_data[c] != m[c][0]) begin
            failures++;
            if (failures < 10) $display("c%0d token %0d want %0d", c, rd_data[c], m[c][0]);
          end
        end
        // producer: random, only when the firing rule allows
        wr_en[c] = can_put[c] && ($urandom_range(0, 9) < ((n / 500) % 2 ? 9 : 3));
        wr_data[c] = seq[c];
      end
      @(posedge clk);
      for (int c = 0; c < 2; c++) begin
        if (rd_en[c]) begin void'(m[c].pop_front()); left[c]--; end
        if (wr_en[c]) begin m[c].push_back(seq[c]); seq[c]++; end
      end
      @(negedge clk);
    end
    for (int c = 0; c < 2; c++) begin
      checks += 2;
      if (fires[c] == 0) begin failures++; $display("c%0d never fired", c); end
      if (blocked[c] == 0) begin failures++; $display("c%0d never full", c); end
      $display("channel %0d: %0d firings, %0d clocks full", c, fires[c], blocked[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
