// fp16_add: combinational IEEE-754 half-precision adder.
//
// This is the "16-bit floating point adder" of the core's peripheral logic:
// every post-synaptic neuron uses one to add a synaptic weight to its
// membrane potential, the weight-update logic uses one to add the scaled
// error to a weight, and the MAC uses one as its accumulator. The paper
// gives only its function; the structure below is this design's own.
//
// How it works: the operand of larger magnitude is kept as it is, the other
// is shifted right by the exponent difference into a 14-bit frame holding
// the 11-bit significand plus guard, round and sticky bits. The two are
// added or subtracted, the result is renormalised (one step right after an
// add carry, a leading-zero count to the left after a cancellation), and
// rounded to nearest even.
//
// Number conventions (this design's choice): subnormal operands count as
// zero and results below 2^-14 flush to signed zero; exponent overflow
// gives infinity; inf + (-inf) gives a quiet NaN. Purely combinational:
// the result is valid in the same cycle as the operands.
module fp16_add
  import snn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic        sa, sb, sl, ss;
  logic [4:0]  ea, eb, el, es;
  logic [10:0] ml, ms;
  logic [4:0]  d;
  logic [13:0] big, small_sh;
  logic [14:0] sum;
  logic [13:0] norm;
  logic [3:0]  lz;
  logic [11:0] rnd;
  logic        rnd_up;
  int          e;

  always_comb begin
    sa = a[15]; sb = b[15];
    ea = a[14:10]; eb = b[14:10];
    y = FP16_ZERO;
    // defaults so every variable is assigned on every path
    sl = sa; ss = sb; el = ea; es = eb; ml = '0; ms = '0; d = '0;
    big = '0; small_sh = '0; sum = '0; norm = '0; lz = '0; rnd = '0;
    rnd_up = 1'b0; e = 0;

    if (ea == 5'd31 || eb == 5'd31) begin
      if (ea == 5'd31 && eb == 5'd31 && sa != sb) y = FP16_NAN;
      else if (ea == 5'd31) y = a;
      else y = b;
    end else if (eb == 5'd0) begin
      y = (ea == 5'd0) ? {sa & sb, 15'd0} : a;
    end else if (ea == 5'd0) begin
      y = b;
    end else begin
      // order by magnitude
      if (a[14:0] >= b[14:0]) begin
        sl = sa; el = ea; ml = {1'b1, a[9:0]};
        ss = sb; es = eb; ms = {1'b1, b[9:0]};
      end else begin
        sl = sb; el = eb; ml = {1'b1, b[9:0]};
        ss = sa; es = ea; ms = {1'b1, a[9:0]};
      end
      d = el - es;
      big = {ml, 3'b000};
      if (d >= 5'd14) begin
        small_sh = 14'd1;                       // only the sticky bit survives
      end else begin
        small_sh = {ms, 3'b000} >> d;
        // sticky: OR of the bits shifted out
        if (({ms, 3'b000} & ((14'd1 << d) - 14'd1)) != 14'd0) small_sh[0] = 1'b1;
      end

      e = int'(el);
      if (sl == ss) begin
        sum = {1'b0, big} + {1'b0, small_sh};
        if (sum[14]) begin
          norm = sum[14:1];
          norm[0] = sum[1] | sum[0];
          e = e + 1;
        end else begin
          norm = sum[13:0];
        end
      end else begin
        sum = {1'b0, big} - {1'b0, small_sh};
        lz = 4'd0;
        for (int i = 13; i >= 0; i--) begin
          if (sum[i]) break;
          lz = lz + 4'd1;
        end
        norm = sum[13:0] << lz;
        e = e - int'(lz);
      end

      if (sum == 15'd0) begin
        y = FP16_ZERO;                          // exact cancellation gives +0
      end else if (e <= 0) begin
        y = {sl, 15'd0};                        // flush to zero
      end else begin
        rnd_up = norm[2] & (norm[1] | norm[0] | norm[3]);
        rnd = {1'b0, norm[13:3]} + {11'd0, rnd_up};
        if (rnd[11]) begin
          rnd = rnd >> 1;
          e = e + 1;
        end
        if (e >= 31) y = {sl, 15'h7C00};
        else         y = {sl, 5'(e), rnd[9:0]};
      end
    end
  end

endmodule
