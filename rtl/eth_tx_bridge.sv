// eth_tx_bridge: TX bridge that lets the ARP block and UDP_TX share the
// Ethernet MAC's transmit stream. Each source raises req while it has a frame
// and presents the current byte on data/last; the bridge grants one source
// (ARP first, so address resolution and replies are not starved), forwards
// its bytes with sop on the first and eop on the last, and returns ack for
// every byte the MAC accepts (mac_tx_ready). The grant is held until the last
// byte is accepted, so frames never interleave.
// Arbitration priority and the stream format are this design's choices.
module eth_tx_bridge (
  input  logic       clk,
  input  logic       rst,
  // source 0: ARP
  input  logic       req0,
  input  logic [7:0] data0,
  input  logic       last0,
  output logic       ack0,
  // source 1: UDP_TX
  input  logic       req1,
  input  logic [7:0] data1,
  input  logic       last1,
  output logic       ack1,
  // MAC transmit stream
  output logic [7:0] mac_tx_data,
  output logic       mac_tx_valid,
  output logic       mac_tx_sop,
  output logic       mac_tx_eop,
  input  logic       mac_tx_ready
);
  typedef enum logic [1:0] {IDLE, G0, G1} state_e;
  state_e st;
  logic first;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; first <= 1'b0;
    end else begin
      unique case (st)
        IDLE: begin
          first <= 1'b1;
          if (req0)      st <= G0;
          else if (req1) st <= G1;
        end
        G0: if (mac_tx_ready) begin first <= 1'b0; if (last0) st <= IDLE; end
        G1: if (mac_tx_ready) begin first <= 1'b0; if (last1) st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    mac_tx_valid = (st != IDLE);
    mac_tx_data  = (st == G0) ? data0 : (st == G1) ? data1 : 8'h00;
    mac_tx_eop   = (st == G0) ? last0 : (st == G1) ? last1 : 1'b0;
    mac_tx_sop   = mac_tx_valid && first;
    ack0         = (st == G0) && mac_tx_ready;
    ack1         = (st == G1) && mac_tx_ready;
  end

  a_no_interleave: assert property (@(posedge clk) disable iff (rst)
    (st == G1 && !(last1 && mac_tx_ready)) |=> st == G1);
endmodule
