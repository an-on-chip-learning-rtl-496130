// weight_update: new value and flipped bits of one synapse.
//
// Implements w(n+1) = w(n) + 2^-b * delta and w_flip = w(n+1) XOR w(n), the
// two lines of the paper's weight-update block. The learning rate is a
// power of two, eta = 2^-b, so the scaling is an exponent shift; the sum is
// an FP16 add. With a binary pre-synaptic spike the update
// Delta w = eta * delta * a is applied only on rows whose input spiked; the
// caller enables the block (en) for those rows, and with en low the weight
// is returned unchanged and no bit flips.
//
// The sign follows the paper's formula (the update is added); the
// paper folds the sign of the gradient into delta. Combinational.
module weight_update
  import snn_pkg::*;
(
  input  logic       en,
  input  fp16_t      w_old,
  input  fp16_t      delta,
  input  logic [4:0] lr_shift,    // b in eta = 2^-b
  output fp16_t      w_new,
  output fp16_t      flip
);

  fp16_t dw, sum;

  assign dw = fp16_scale_pow2(delta, int'(lr_shift));

  fp16_add u_add (.a(w_old), .b(dw), .y(sum));

  assign w_new = en ? sum : w_old;
  assign flip  = w_new ^ w_old;

endmodule
