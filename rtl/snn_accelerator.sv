// snn_accelerator: top level holding the two neurosynaptic cores side by
// side: the STT-RAM learning core (2048 inputs, 128 FP16 neurons, on-chip
// back-propagation and weight update) and the inference core it extends
// (256 inputs, 32 neurons, 8-bit fixed-point weights). The two are
// independent designs with separate clocks; every port of each core is
// brought out unchanged, prefixed lc_ (learning core, logic clock lc_clk,
// 500 MHz in the paper, memory at lc_clk/5) or ic_ (inference core,
// clocked by its 100 MHz memory clock ic_clk). One asynchronous active-low
// reset serves both. See snn_learning_core and snn_inference_core for the
// operation and timing of each.
module snn_accelerator
  import snn_pkg::*;
#(
  parameter int unsigned LC_N_IN      = 2048,
  parameter int unsigned LC_N_NEURONS = 128,
  parameter int unsigned LC_MEM_DIV   = 5,
  parameter int unsigned IC_N_IN      = 256,
  parameter int unsigned IC_N_NEURONS = 32,
  parameter int unsigned LC_ROW_W     = $clog2(LC_N_IN),
  parameter int unsigned IC_ROW_W     = $clog2(IC_N_IN)
) (
  input  logic                        rst_n,
  // ---------------- learning core ----------------
  input  logic                        lc_clk,
  input  logic                        lc_cmd_valid,
  output logic                        lc_cmd_ready,
  input  core_cmd_e                   lc_cmd,
  input  logic [LC_ROW_W-1:0]         lc_cmd_row,
  output logic                        lc_done,
  input  logic signed [4:0]           lc_theta_exp,
  input  logic [4:0]                  lc_lr_shift,
  input  logic [LC_ROW_W-1:0]         lc_route_base,
  input  logic                        lc_spikes_clear,
  input  logic                        lc_pkt_in_valid,
  input  pkt_kind_e                   lc_pkt_in_kind,
  input  logic [LC_ROW_W-1:0]         lc_pkt_in_addr,
  output logic                        lc_pkt_out_valid,
  input  logic                        lc_pkt_out_ready,
  output pkt_kind_e                   lc_pkt_out_kind,
  output logic [LC_ROW_W-1:0]         lc_pkt_out_addr,
  output fp16_t                       lc_v_out [LC_N_NEURONS],
  output logic [LC_N_NEURONS-1:0]     lc_spike_out,
  output logic [LC_N_NEURONS-1:0]     lc_grad_out,
  input  fp16_t                       lc_delta_in [LC_N_NEURONS],
  output logic                        lc_delta_out_valid,
  output logic [LC_ROW_W-1:0]         lc_delta_out_row,
  output fp16_t                       lc_delta_out,
  input  fp16_t                       lc_host_wr_data [LC_N_NEURONS],
  output logic                        lc_host_rd_valid,
  output fp16_t                       lc_host_rd_data [LC_N_NEURONS],
  // ---------------- inference core ----------------
  input  logic                        ic_clk,
  input  logic                        ic_cmd_valid,
  output logic                        ic_cmd_ready,
  input  core_cmd_e                   ic_cmd,
  input  logic [IC_ROW_W-1:0]         ic_cmd_row,
  output logic                        ic_done,
  input  logic signed [15:0]          ic_theta,
  input  logic                        ic_spikes_clear,
  input  logic                        ic_pkt_in_valid,
  input  pkt_kind_e                   ic_pkt_in_kind,
  input  logic [IC_ROW_W-1:0]         ic_pkt_in_addr,
  output logic signed [15:0]          ic_v_out [IC_N_NEURONS],
  output logic [IC_N_NEURONS-1:0]     ic_spike_out,
  input  logic signed [7:0]           ic_host_wr_data [IC_N_NEURONS],
  output logic                        ic_host_rd_valid,
  output logic signed [7:0]           ic_host_rd_data [IC_N_NEURONS]
);

  snn_learning_core #(
    .N_IN(LC_N_IN), .N_NEURONS(LC_N_NEURONS), .MEM_DIV(LC_MEM_DIV), .ROW_W(LC_ROW_W)
  ) u_learning (
    .clk(lc_clk), .rst_n,
    .cmd_valid(lc_cmd_valid), .cmd_ready(lc_cmd_ready), .cmd(lc_cmd),
    .cmd_row(lc_cmd_row), .done(lc_done),
    .theta_exp(lc_theta_exp), .lr_shift(lc_lr_shift), .route_base(lc_route_base),
    .spikes_clear(lc_spikes_clear), .pkt_in_valid(lc_pkt_in_valid),
    .pkt_in_kind(lc_pkt_in_kind), .pkt_in_addr(lc_pkt_in_addr),
    .pkt_out_valid(lc_pkt_out_valid), .pkt_out_ready(lc_pkt_out_ready),
    .pkt_out_kind(lc_pkt_out_kind), .pkt_out_addr(lc_pkt_out_addr),
    .v_out(lc_v_out), .spike_out(lc_spike_out), .grad_out(lc_grad_out),
    .delta_in(lc_delta_in), .delta_out_valid(lc_delta_out_valid),
    .delta_out_row(lc_delta_out_row), .delta_out(lc_delta_out),
    .host_wr_data(lc_host_wr_data), .host_rd_valid(lc_host_rd_valid),
    .host_rd_data(lc_host_rd_data)
  );

  snn_inference_core #(
    .N_IN(IC_N_IN), .N_NEURONS(IC_N_NEURONS), .WB(8), .V_BITS(16), .ROW_W(IC_ROW_W)
  ) u_inference (
    .clk(ic_clk), .rst_n,
    .cmd_valid(ic_cmd_valid), .cmd_ready(ic_cmd_ready), .cmd(ic_cmd),
    .cmd_row(ic_cmd_row), .done(ic_done), .theta(ic_theta),
    .spikes_clear(ic_spikes_clear), .pkt_in_valid(ic_pkt_in_valid),
    .pkt_in_kind(ic_pkt_in_kind), .pkt_in_addr(ic_pkt_in_addr),
    .v_out(ic_v_out), .spike_out(ic_spike_out),
    .host_wr_data(ic_host_wr_data), .host_rd_valid(ic_host_rd_valid),
    .host_rd_data(ic_host_rd_data)
  );

endmodule
