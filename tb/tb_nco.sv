// tb_nco: self-checking test of the NCO.
// Instance u0 (no dither) runs with a random tuning word; a phase
// accumulator kept here predicts the table address of every output, and the
// cosine and sine values are computed here with $cos/$sin and rounded.
// Instance u1 adds a 22-bit phase dither; each of its outputs must equal the
// table value at the undithered address or the next one, and the dither must
// move the address at least sometimes. Latency: VLD one clock after EN.
module tb_nco;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic [31:0] ftw;
  logic v0, v1;
  logic signed [15:0] c0, s0, c1, s1;
  nco u0 (.clk, .rst, .en, .ftw, .vld(v0), .cos_out(c0), .sin_out(s0));
  nco #(.PHASE_DITHER_WIDTH(22)) u1 (.clk, .rst, .en, .ftw, .vld(v1), .cos_out(c1), .sin_out(s1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(input real v);
    return $rtoi($floor(32767.0 * v + 0.5));
  endfunction

  initial begin
    logic [31:0] ph;
    int a, moved = 0;
    real th, th1;
    en = 0; ftw = 32'h0123_4567 + $urandom_range(0, 1 << 20);
    ph = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      if (en) begin
        a = int'(ph[31:22]);
        th  = 2.0 * 3.141592653589793 * a / 1024.0;
        th1 = 2.0 * 3.141592653589793 * ((a + 1) % 1024) / 1024.0;
        ph = ph + ftw;
        @(posedge clk); #1;
        checks++;
        if (!v0 || int'(c0) != q($cos(th)) || int'(s0) != q($sin(th))) begin
          failures++;
          if (failures < 10) $display("n=%0d a=%0d got %0d %0d want %0d %0d", n, a, c0, s0, q($cos(th)), q($sin(th)));
        end
        checks++;
        if (!v1) failures++;
        else if (int'(c1) == q($cos(th)) && int'(s1) == q($sin(th))) ;
        else if (int'(c1) == q($cos(th1)) && int'(s1) == q($sin(th1))) moved++;
        else begin failures++; if (failures < 10) $display("dither out of range at n=%0d", n); end
      end else begin
        @(posedge clk); #1;
        checks++;
        if (v0 || v1) failures++;
      end
    end
    checks++;
    if (moved == 0) begin failures++; $display("dither never moved the address"); end
    $display("dither moved the address %0d times", moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
