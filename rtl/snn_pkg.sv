// snn_pkg: types, sizes and small helper functions shared by the blocks of the
// STT-RAM spiking-neural-network learning core.
//
// The core stores each synaptic weight as a 16-bit IEEE-754 half-precision
// (FP16) number in 16 adjacent bit cells of one crossbar row; 2048 wordlines
// (one per pre-synaptic input) and 2048 bitlines give 128 post-synaptic
// neurons. The memory runs at 100 MHz and the digital logic at 500 MHz, so
// one memory cycle spans MEM_DIV = 5 logic cycles. Two write drivers serve
// each 16-bit synapse, so programming a row takes 8 memory cycles. All of
// these numbers follow the paper.
//
// Spike packets (a type bit and a wordline address) are this design's own
// format: the paper names the packet decoder and router but not the
// packet layout.
//
// FP16 conventions used throughout (this design's choice): subnormal inputs
// and results are flushed to zero, results that overflow become infinity,
// rounding is to nearest, ties to even.
package snn_pkg;

  // Array and core geometry (Sec. IV / Fig. 3).
  localparam int unsigned N_INPUTS_DEF  = 2048;  // wordlines
  localparam int unsigned N_NEURONS_DEF = 128;   // post-synaptic neurons
  localparam int unsigned W_BITS        = 16;    // bit cells per synapse
  localparam int unsigned MEM_DIV_DEF   = 5;     // logic clock / memory clock
  localparam int unsigned DRIVERS_PER_SYN = 2;   // write drivers per synapse
  localparam int unsigned WRITE_CYCLES  = W_BITS / DRIVERS_PER_SYN;  // 8

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP16_ZERO = 16'h0000;
  localparam fp16_t FP16_INF  = 16'h7C00;
  localparam fp16_t FP16_NAN  = 16'h7E00;

  // Packet carried between cores: a spike (a=1) or a non-zero activation
  // gradient flag (g=1) of one pre-synaptic neuron.
  typedef enum logic {PKT_SPIKE = 1'b0, PKT_GRAD = 1'b1} pkt_kind_e;

  // Commands of the learning core.
  typedef enum logic [1:0] {
    CMD_FORWARD   = 2'd0,   // forward pass over the spiking rows
    CMD_BACKWARD  = 2'd1,   // back-propagation and weight update
    CMD_WRITE_ROW = 2'd2,   // host writes one full row
    CMD_READ_ROW  = 2'd3    // host reads one full row
  } core_cmd_e;

  // True when x counts as zero (zero or subnormal, flushed to zero).
  function automatic logic fp16_is_zero(fp16_t x);
    return x[14:10] == 5'd0;
  endfunction

  // x * 2^-s, the shift used for the learning rate 2^-b and for 1/(2*theta).
  // Underflow flushes to signed zero, overflow gives signed infinity.
  function automatic fp16_t fp16_scale_pow2(fp16_t x, int s);
    int e;
    if (x[14:10] == 5'd0) return {x[15], 15'd0};
    if (x[14:10] == 5'd31) return x;
    e = int'(x[14:10]) - s;
    if (e <= 0) return {x[15], 15'd0};
    if (e >= 31) return {x[15], 15'h7C00};
    return {x[15], 5'(e), x[9:0]};
  endfunction

  // FP16 value of 2^p (p in -14..15).
  function automatic fp16_t fp16_pow2(int p);
    return {1'b0, 5'(p + 15), 10'd0};
  endfunction

endpackage
