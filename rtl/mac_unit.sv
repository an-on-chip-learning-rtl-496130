// mac_unit: back-propagates the error gradient of one crossbar row.
//
// For pre-synaptic neuron i whose activation gradient is non-zero the core
// needs delta_i^(k-1) = 1/(2*theta) * sum_j w(j,i) * delta_j^k, where the
// w(j,i) are the weights just read from row i and delta^k is the error of
// the core's own neurons. The paper computes this in one MAC unit shared
// by all neurons, followed by a 1/(2*theta) shifter, and notes that the MAC
// needs more cycles than the memory access; the statistics it reports count
// only neurons with non-zero delta. This unit therefore walks the neurons
// with non-zero delta in ascending order, one FP16 multiply-accumulate per
// logic cycle, and skips the others (zero-skipping is this design's reading
// of those counts). The accumulation order is ascending j; products and
// sums are rounded to FP16 at every step.
//
// Timing: start (while idle) latches the row weights and the delta vector.
// The unit is then busy for nnz+1 logic cycles, nnz being the number of
// non-zero deltas: one per product, one to apply the 1/(2*theta) shift.
// done pulses for one cycle with result valid, and result holds until the
// next start.
module mac_unit
  import snn_pkg::*;
#(
  parameter int unsigned N = 128,
  parameter int unsigned IDX_W = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  fp16_t             w     [N],
  input  fp16_t             delta [N],
  input  logic signed [4:0] theta_exp,   // theta = 2^theta_exp
  output logic              busy,
  output logic              done,
  output fp16_t             result
);

  fp16_t           w_q [N];
  fp16_t           d_q [N];
  logic [N-1:0]    pending;
  fp16_t           acc, prod, acc_next;
  logic            found;
  logic [IDX_W-1:0] j;

  find_first_set #(.W(N), .IDX_W(IDX_W)) u_ffs (.vec(pending), .found(found), .idx(j));
  fp16_mul u_mul (.a(w_q[j]), .b(d_q[j]), .y(prod));
  fp16_add u_add (.a(acc), .b(prod), .y(acc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      pending <= '0;
      acc     <= FP16_ZERO;
      result  <= FP16_ZERO;
      for (int n = 0; n < int'(N); n++) begin
        w_q[n] <= FP16_ZERO;
        d_q[n] <= FP16_ZERO;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          acc  <= FP16_ZERO;
          for (int n = 0; n < int'(N); n++) begin
            w_q[n]     <= w[n];
            d_q[n]     <= delta[n];
            pending[n] <= !fp16_is_zero(delta[n]);
          end
        end
      end else if (found) begin
        acc        <= acc_next;
        pending[j] <= 1'b0;
      end else begin
        result <= fp16_scale_pow2(acc, int'(theta_exp) + 1);
        busy   <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("mac_unit: start while busy");

endmodule
