// spike_decoder: decodes incoming spike packets into wordline flags.
//
// The core receives, per time step, the spikes a^(k-1) and the non-zero
// activation-gradient flags g^(k-1) of the previous layer as packets. Each
// packet names one pre-synaptic neuron, i.e. one wordline of the crossbar.
// The decoder turns the packet address into a one-hot wordline select and
// sets that wordline's bit in the spike map or the gradient map. The
// controller later walks these maps to read only the rows that received
// something, as the paper prescribes. The packet format (kind bit plus
// address) and the bitmap storage are this design's choices; the paper
// only names the decoder.
//
// Interface: pkt_valid with pkt_kind/pkt_addr is accepted in every cycle
// (the decoder never stalls). clear empties both maps at the start of a
// time step; a packet in the same cycle as clear is kept.
module spike_decoder
  import snn_pkg::*;
#(
  parameter int unsigned N_IN   = 2048,
  parameter int unsigned ADDR_W = $clog2(N_IN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              pkt_valid,
  input  pkt_kind_e         pkt_kind,
  input  logic [ADDR_W-1:0] pkt_addr,
  output logic [N_IN-1:0]   spike_map,
  output logic [N_IN-1:0]   grad_map
);

  logic [N_IN-1:0] onehot;

  always_comb begin
    onehot = '0;
    if (pkt_valid && int'(pkt_addr) < int'(N_IN)) onehot[pkt_addr] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike_map <= '0;
      grad_map  <= '0;
    end else begin
      spike_map <= (clear ? '0 : spike_map) | ((pkt_kind == PKT_SPIKE) ? onehot : '0);
      grad_map  <= (clear ? '0 : grad_map)  | ((pkt_kind == PKT_GRAD)  ? onehot : '0);
    end
  end

endmodule
