// snn_learning_core: one neurosynaptic learning core for a binary-activation
// spiking neural network, built around an STT-RAM crossbar.
//
// The crossbar has N_IN wordlines, one per pre-synaptic input, and
// N_NEURONS*16 bitlines: the 16 adjacent bitlines 16j..16j+15 of a row hold
// the FP16 weight w(j,i) from input i to neuron j (bit b of the weight in
// bitline 16j+b; the bit order is this design's choice). With the defaults,
// 2048 inputs and 128 neurons, the array is 2048 x 2048 bits (512 KB), the
// paper's configuration. One core computes one layer of up to 128
// neurons; wider layers use several cores fed with the same input packets.
//
// Dataflow:
//  * Input packets (spike_decoder) mark the wordlines that received a spike
//    a^(k-1) or a non-zero activation gradient g^(k-1).
//  * CMD_FORWARD reads each spiking row once; all neurons add their weight
//    in parallel (snn_neuron, one FP16 adder each). The neurons then fire:
//    spike_out = v > theta, grad_out = 0 <= v <= 2*theta, and the router
//    sends both as packets to the next layer.
//  * CMD_BACKWARD latches delta^k (delta_in) and reads every row that
//    received a spike or gradient flag. For a row with g set, the MAC forms
//    delta_i^(k-1) = 1/(2*theta) * sum_j w(j,i)*delta_j and the core emits
//    it on delta_out. For a row with a set, every neuron's weight_update
//    forms w + 2^-b*delta_j, the XOR with the old row marks the flipped
//    bits, and the write scheduler programs only those bits, two per synapse
//    per memory cycle. MAC and write run in parallel, and the next row is
//    read while the MAC is still busy.
//  * CMD_WRITE_ROW / CMD_READ_ROW give the host access to whole rows for
//    loading and reading back weights.
//
// Clocks: one logic clock; the array acts on every MEM_DIV-th cycle (the
// memory clock, 100 MHz against 500 MHz logic in the paper). The
// output-layer error delta^L (loss derivative) is computed outside the
// core and supplied on delta_in, like the delta^k that a following layer's
// cores return on their delta_out.
module snn_learning_core
  import snn_pkg::*;
#(
  parameter int unsigned N_IN      = N_INPUTS_DEF,    // 2048
  parameter int unsigned N_NEURONS = N_NEURONS_DEF,   // 128
  parameter int unsigned MEM_DIV   = MEM_DIV_DEF,     // 5
  parameter int unsigned ROW_W     = $clog2(N_IN),
  parameter int unsigned COLS      = N_NEURONS * W_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  core_cmd_e         cmd,
  input  logic [ROW_W-1:0]  cmd_row,
  output logic              done,
  // configuration
  input  logic signed [4:0] theta_exp,     // spiking threshold theta = 2^theta_exp
  input  logic [4:0]        lr_shift,      // learning rate eta = 2^-lr_shift
  input  logic [ROW_W-1:0]  route_base,    // address of neuron 0 in output packets
  // input packets from the previous layer
  input  logic              spikes_clear,
  input  logic              pkt_in_valid,
  input  pkt_kind_e         pkt_in_kind,
  input  logic [ROW_W-1:0]  pkt_in_addr,
  // output packets to the next layer
  output logic              pkt_out_valid,
  input  logic              pkt_out_ready,
  output pkt_kind_e         pkt_out_kind,
  output logic [ROW_W-1:0]  pkt_out_addr,
  // neuron state after the forward pass
  output fp16_t             v_out     [N_NEURONS],
  output logic [N_NEURONS-1:0] spike_out,
  output logic [N_NEURONS-1:0] grad_out,
  // error of this layer in, error of the previous layer out
  input  fp16_t             delta_in  [N_NEURONS],
  output logic              delta_out_valid,
  output logic [ROW_W-1:0]  delta_out_row,
  output fp16_t             delta_out,
  // host row access
  input  fp16_t             host_wr_data [N_NEURONS],
  output logic              host_rd_valid,
  output fp16_t             host_rd_data [N_NEURONS]
);

  logic             mem_tick;
  logic [N_IN-1:0]  spike_map, grad_map;
  logic             rd_en;
  logic [ROW_W-1:0] rd_row;
  logic [COLS-1:0]  rd_data;
  logic             neuron_clear, neuron_acc, fire;
  logic             router_busy;
  logic             delta_latch, wu_en;
  logic             mac_start, mac_busy, mac_done;
  logic             ws_start, ws_host, ws_busy;
  logic [ROW_W-1:0] ws_row;
  logic             wr_en;
  logic [ROW_W-1:0] wr_row;
  logic [COLS-1:0]  wr_data, wr_mask;
  logic [COLS-1:0]  new_row, flip_row, host_row;
  fp16_t            row_w   [N_NEURONS];
  fp16_t            delta_q [N_NEURONS];
  logic [N_NEURONS-1:0] spike_now, grad_now;

  core_controller #(.N_IN(N_IN), .MEM_DIV(MEM_DIV), .ROW_W(ROW_W)) u_ctrl (
    .clk, .rst_n, .mem_tick,
    .cmd_valid, .cmd_ready, .cmd, .cmd_row, .done,
    .spike_map, .grad_map,
    .rd_en, .rd_row,
    .neuron_clear, .neuron_acc, .fire, .router_busy,
    .delta_latch, .wu_en, .mac_start, .mac_busy, .mac_done,
    .ws_start, .ws_host, .ws_row, .ws_busy,
    .delta_valid(delta_out_valid), .delta_row(delta_out_row),
    .host_rd_valid
  );

  spike_decoder #(.N_IN(N_IN), .ADDR_W(ROW_W)) u_dec (
    .clk, .rst_n, .clear(spikes_clear),
    .pkt_valid(pkt_in_valid), .pkt_kind(pkt_in_kind), .pkt_addr(pkt_in_addr),
    .spike_map, .grad_map
  );

  stt_crossbar #(.ROWS(N_IN), .COLS(COLS), .ROW_W(ROW_W)) u_array (
    .clk, .mem_tick,
    .rd_en, .rd_row, .rd_data,
    .wr_en, .wr_row, .wr_data, .wr_mask
  );

  // error of this layer, held for the whole backward pass
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(N_NEURONS); j++) delta_q[j] <= FP16_ZERO;
    end else if (delta_latch) begin
      for (int j = 0; j < int'(N_NEURONS); j++) delta_q[j] <= delta_in[j];
    end
  end

  // per-neuron peripheral logic: forward neuron and weight update
  for (genvar j = 0; j < int'(N_NEURONS); j++) begin : g_neuron
    fp16_t w_new, flip;

    assign row_w[j]        = rd_data[j*W_BITS +: W_BITS];
    assign host_rd_data[j] = row_w[j];
    assign host_row[j*W_BITS +: W_BITS] = host_wr_data[j];

    snn_neuron u_neuron (
      .clk, .rst_n, .clear(neuron_clear), .acc_en(neuron_acc),
      .w(row_w[j]), .theta_exp,
      .v(v_out[j]), .spike(spike_now[j]), .grad(grad_now[j])
    );

    weight_update u_wu (
      .en(wu_en), .w_old(row_w[j]), .delta(delta_q[j]), .lr_shift,
      .w_new, .flip
    );
    assign new_row [j*W_BITS +: W_BITS] = w_new;
    assign flip_row[j*W_BITS +: W_BITS] = flip;
  end

  // shared back-propagation MAC with the 1/(2*theta) shift
  mac_unit #(.N(N_NEURONS)) u_mac (
    .clk, .rst_n, .start(mac_start),
    .w(row_w), .delta(delta_q), .theta_exp,
    .busy(mac_busy), .done(mac_done), .result(delta_out)
  );

  write_scheduler #(.COLS(COLS), .ROW_W(ROW_W)) u_ws (
    .clk, .rst_n, .mem_tick, .start(ws_start),
    .row(ws_host ? cmd_row : ws_row),
    .data(ws_host ? host_row : new_row),
    .flip(ws_host ? '1 : flip_row),
    .busy(ws_busy), .done(),
    .wr_en, .wr_row, .wr_data, .wr_mask
  );

  // outputs of the forward pass
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike_out <= '0;
      grad_out  <= '0;
    end else if (fire) begin
      spike_out <= spike_now;
      grad_out  <= grad_now;
    end
  end

  spike_router #(.N(N_NEURONS), .ADDR_W(ROW_W)) u_router (
    .clk, .rst_n, .load(fire), .spikes(spike_now), .grads(grad_now),
    .route_base, .busy(router_busy),
    .pkt_valid(pkt_out_valid), .pkt_ready(pkt_out_ready),
    .pkt_kind(pkt_out_kind), .pkt_addr(pkt_out_addr)
  );

endmodule
