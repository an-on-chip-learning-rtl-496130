// find_first_set: index of the lowest set bit of a vector.
//
// Helper used wherever the core walks a sparse set in ascending order: the
// controller over the wordlines that received a spike or gradient, the MAC
// over the neurons whose error delta is non-zero, and the router over the
// neurons that fired. found is low when no bit is set (idx is then 0).
// Combinational.
module find_first_set #(
  parameter int unsigned W   = 2048,
  parameter int unsigned IDX_W = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]     vec,
  output logic             found,
  output logic [IDX_W-1:0] idx
);

  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int i = int'(W) - 1; i >= 0; i--) begin
      if (vec[i]) begin
        found = 1'b1;
        idx   = IDX_W'(i);
      end
    end
  end

endmodule
