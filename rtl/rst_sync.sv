// rst_sync: reset synchroniser - asserts asynchronously, releases on the
// second clock edge after the external reset goes away, so each clock domain
// leaves reset cleanly. The document recommends synchronising resets in
// every clock domain; this is the usual two-flop form.
module rst_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic q;
  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      q <= 1'b1; rst_out <= 1'b1;
    end else begin
      q <= 1'b0; rst_out <= q;
    end
  end
endmodule
