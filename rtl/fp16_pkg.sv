// fp16_pkg - types and constants shared by the Gabor-type filter (GTF) datapath.
//
// All arithmetic in the filter uses 16-bit floating point. The word layout is
// IEEE 754 binary16: 1 sign bit, 5 exponent bits (bias 15), 10 fraction bits.
// The arithmetic units built on it round to nearest-even and flush subnormal
// operands and results to a signed zero; infinities and NaN propagate.
// The neighbour order W, E, N, S used for the operand arrays is also fixed here.
package fp16_pkg;

  typedef logic [15:0] fp16_t;

  typedef struct packed {
    logic       sign;
    logic [4:0] exp;
    logic [9:0] frac;
  } fp16_fields_t;

  localparam fp16_t FP16_ZERO  = 16'h0000;
  localparam fp16_t FP16_QNAN  = 16'h7E00;
  localparam int    FP16_BIAS  = 15;
  localparam logic [14:0] FP16_INF_MAG = 15'h7C00;

  // Neighbour index in the yr/yi operand arrays.
  typedef enum logic [1:0] {NB_W = 2'd0, NB_E = 2'd1, NB_N = 2'd2, NB_S = 2'd3} nb_e;

  // Coefficient index in the coef array.
  typedef enum logic [1:0] {C_AX = 2'd0, C_AY = 2'd1, C_BX = 2'd2, C_BY = 2'd3} coef_e;

  // Number of register stages from the operands of the computation unit to its
  // Rterm/Iterm output registers.
  localparam int GTF_LATENCY = 6;

  // Classification of a word by its magnitude bits [14:0].
  function automatic logic fp16_is_nan(logic [14:0] mag);
    return (mag[14:10] == 5'h1F) && (mag[9:0] != 10'd0);
  endfunction

  function automatic logic fp16_is_inf(logic [14:0] mag);
    return mag == 15'h7C00;
  endfunction

  // Zero, or a subnormal that the units read as zero, by exponent field.
  function automatic logic fp16_is_zero(logic [4:0] exponent);
    return exponent == 5'd0;
  endfunction

endpackage
