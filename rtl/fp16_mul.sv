// fp16_mul: combinational IEEE-754 half-precision multiplier.
//
// Forms the product w(j,i) * delta(j) inside the MAC unit that back-propagates
// the error gradient. The paper names the MAC and the FP16 format but not
// the multiplier's structure; this one is the plain textbook form.
//
// How it works: the two 11-bit significands (hidden bit included) are
// multiplied to a 22-bit product whose leading one sits in bit 21 or 20.
// The exponent is the sum of the operands' minus the bias 15, plus one if
// the product needed a right shift. The product is rounded to nearest even
// on its 11 leading bits, with a guard bit and a sticky OR of the rest.
//
// Number conventions (this design's choice, shared with fp16_add): subnormal
// operands count as zero, results below 2^-14 flush to signed zero,
// overflow gives infinity, 0 * inf gives a quiet NaN. Combinational.
module fp16_mul
  import snn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic        s;
  logic [21:0] p;
  logic [10:0] m;
  logic        g, st, up;
  logic [11:0] rnd;
  int          e;

  always_comb begin
    s = a[15] ^ b[15];
    p = '0; m = '0; g = 1'b0; st = 1'b0; up = 1'b0; rnd = '0; e = 0;
    y = {s, 15'd0};
    if (a[14:10] == 5'd31 || b[14:10] == 5'd31) begin
      if (a[14:10] == 5'd0 || b[14:10] == 5'd0) y = FP16_NAN;
      else y = {s, 15'h7C00};
    end else if (a[14:10] == 5'd0 || b[14:10] == 5'd0) begin
      y = {s, 15'd0};
    end else begin
      p = {1'b1, a[9:0]} * {1'b1, b[9:0]};
      e = int'(a[14:10]) + int'(b[14:10]) - 15;
      if (p[21]) begin
        m  = p[21:11];
        g  = p[10];
        st = |p[9:0];
        e  = e + 1;
      end else begin
        m  = p[20:10];
        g  = p[9];
        st = |p[8:0];
      end
      if (e <= 0) begin
        y = {s, 15'd0};
      end else begin
        up  = g & (st | m[0]);
        rnd = {1'b0, m} + {11'd0, up};
        if (rnd[11]) begin
          rnd = rnd >> 1;
          e = e + 1;
        end
        if (e >= 31) y = {s, 15'h7C00};
        else         y = {s, 5'(e), rnd[9:0]};
      end
    end
  end

endmodule
