// spike_router: sends the core's output spikes and gradient flags onward as
// packets.
//
// At the end of a forward pass the core's neurons hold their spikes a^k and
// activation-gradient flags g^k. The next layer's cores need both: the
// spikes drive their forward pass and weight update, the flags select the
// rows on which they back-propagate the error. The router snapshots both
// vectors (load) and emits one packet per set bit, lowest neuron first and,
// for one neuron, the spike before the flag. The packet address is
// route_base + neuron index, so two 128-neuron cores can feed one 256-input
// layer, as the paper does for 256-neuron layers. The paper only
// names the router; packet format and ordering are this design's own.
//
// Interface: valid/ready handshake on the output; a packet is transferred in
// a cycle where both are high, and pkt_kind/pkt_addr hold while valid is
// high and ready is low. busy is high while packets remain. load while busy
// is not allowed.
module spike_router
  import snn_pkg::*;
#(
  parameter int unsigned N      = 128,
  parameter int unsigned ADDR_W = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [N-1:0]      spikes,
  input  logic [N-1:0]      grads,
  input  logic [ADDR_W-1:0] route_base,
  output logic              busy,
  output logic              pkt_valid,
  input  logic              pkt_ready,
  output pkt_kind_e         pkt_kind,
  output logic [ADDR_W-1:0] pkt_addr
);

  localparam int unsigned IDX_W = $clog2(N);

  logic [N-1:0]      pend_s, pend_g;
  logic [ADDR_W-1:0] base_q;
  logic              found;
  logic [IDX_W-1:0]  j;

  find_first_set #(.W(N), .IDX_W(IDX_W)) u_ffs (.vec(pend_s | pend_g), .found(found), .idx(j));

  assign busy      = found;
  assign pkt_valid = found;
  assign pkt_kind  = pend_s[j] ? PKT_SPIKE : PKT_GRAD;
  assign pkt_addr  = base_q + ADDR_W'(j);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_s <= '0;
      pend_g <= '0;
      base_q <= '0;
    end else if (load) begin
      pend_s <= spikes;
      pend_g <= grads;
      base_q <= route_base;
    end else if (pkt_valid && pkt_ready) begin
      if (pend_s[j]) pend_s[j] <= 1'b0;
      else           pend_g[j] <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy)
    else $error("spike_router: load while busy");
  assert property (@(posedge clk) disable iff (!rst_n)
                   pkt_valid && !pkt_ready |=> pkt_valid && $stable(pkt_addr) && $stable(pkt_kind))
    else $error("spike_router: packet changed while stalled");

endmodule
