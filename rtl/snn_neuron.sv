// snn_neuron: forward-pass logic of one post-synaptic neuron of the binary
// activation spiking network.
//
// The membrane potential of a time step is the sum of the weights of all
// inputs that spiked in that step (inputs are binary, so no multiply is
// needed): v = sum_i a_i * w_i. The output spike is a = 1 when v > theta,
// and the activation-gradient flag is g = 1 when 0 <= v <= 2*theta (the
// straight-through estimator's derivative 1/(2*theta) is non-zero there).
// Both rules follow the paper. The bias is not a separate register here:
// it is one more crossbar row whose input the host keeps spiking (this
// design's choice, so the bias is stored and trained like any weight).
//
// theta is restricted to a power of two, theta = 2^theta_exp, so that the
// 1/(2*theta) factor of the back-propagation is an exponent shift as in the
// paper's "shift register 1/2theta"; the value itself is not given and is
// a run-time input.
//
// Timing: clear (one cycle) sets v to +0 at the start of a time step; each
// cycle with acc_en adds w into v through an FP16 adder (one add per logic
// cycle). spike and grad are combinational functions of the registered v.
module snn_neuron
  import snn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              acc_en,
  input  fp16_t             w,
  input  logic signed [4:0] theta_exp,   // theta = 2^theta_exp, -14..14
  output fp16_t             v,
  output logic              spike,
  output logic              grad
);

  fp16_t sum;
  logic [14:0] theta_mag, two_theta_mag;

  fp16_add u_add (.a(v), .b(w), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      v <= FP16_ZERO;
    else if (clear)  v <= FP16_ZERO;
    else if (acc_en) v <= sum;
  end

  // magnitude comparisons on the (exponent, fraction) field; positive FP16
  // values order like unsigned integers
  assign theta_mag     = {5'(int'(theta_exp) + 15), 10'd0};
  assign two_theta_mag = {5'(int'(theta_exp) + 16), 10'd0};

  assign spike = !v[15] && (v[14:0] > theta_mag);
  assign grad  = fp16_is_zero(v) || (!v[15] && v[14:0] <= two_theta_mag);

endmodule
