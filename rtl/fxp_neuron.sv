// fxp_neuron: fixed-point integrate-and-fire neuron of the inference core.
//
// Each synaptic weight of the inference core is an 8-bit fixed-point
// number (two's complement is this design's reading; the paper says
// 8-bit fixed precision and that 7-bit signed weights suffice). The neuron
// adds the weight of every spiking input row to its membrane potential and
// fires when v > theta, following Eq. (1) of the paper. The potential
// is W_BITS + log2(N_IN) bits wide, enough for N_IN full-scale weights, so
// it cannot overflow.
//
// Timing: clear sets v to 0 at the start of a time step; each cycle with
// acc_en adds w. spike is a combinational compare of the registered v.
module fxp_neuron #(
  parameter int unsigned W_BITS = 8,
  parameter int unsigned V_BITS = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     acc_en,
  input  logic signed [W_BITS-1:0] w,
  input  logic signed [V_BITS-1:0] theta,
  output logic signed [V_BITS-1:0] v,
  output logic                     spike
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      v <= '0;
    else if (clear)  v <= '0;
    else if (acc_en) v <= v + V_BITS'(w);
  end

  assign spike = v > theta;

endmodule
