// gtf_input_mux - operand multiplexer of the resource-shared GTF computation tree.
//
// The Gabor-type filter update of one cell is complex. With the west/north
// neighbour weighted by e^{+jw} and the east/south neighbour by e^{-jw}, its two
// parts are
//   real = bu + ax*(RW+RE) + bx*(RN+RS) + ay*(IE-IW) + by*(IS-IN)
//   imag =  0 + ax*(IW+IE) + bx*(IN+IS) + ay*(RW-RE) + by*(RN-RS)
// where R/I are the real/imaginary outputs of the four neighbours. Both have the
// form c0 + ax*s1 + bx*s2 + ay*d1 + by*d2, so one tree serves both parts and
// only its operands change with the select line s (0 real, 1 imaginary). The
// weighted input bu is multiplexed with zero because only the real part has it.
//
// Outputs: sum_op[0]+sum_op[1] and sum_op[2]+sum_op[3] feed the sum pre-adders,
// dif_op[0]-dif_op[1] and dif_op[2]-dif_op[3] the difference pre-adders.
// Purely combinational. The sharing and the bu/zero selection follow the filter
// description; the neighbour sign convention is this design's reading of it.
module gtf_input_mux
  import fp16_pkg::*;
(
  input  logic            s,
  input  fp16_t     [3:0] yr,      // real parts, indexed by nb_e (W, E, N, S)
  input  fp16_t     [3:0] yi,      // imaginary parts, indexed by nb_e
  input  fp16_t           bu,
  output fp16_t     [3:0] sum_op,
  output fp16_t     [3:0] dif_op,
  output fp16_t           c0
);

  always_comb begin
    if (!s) begin
      sum_op = {yr[NB_S], yr[NB_N], yr[NB_E], yr[NB_W]};
      dif_op = {yi[NB_N], yi[NB_S], yi[NB_W], yi[NB_E]};
      c0     = bu;
    end else begin
      sum_op = {yi[NB_S], yi[NB_N], yi[NB_E], yi[NB_W]};
      dif_op = {yr[NB_S], yr[NB_N], yr[NB_E], yr[NB_W]};
      c0     = FP16_ZERO;
    end
  end

endmodule
