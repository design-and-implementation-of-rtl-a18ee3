// fp16_mul - registered binary16 floating-point multiplier.
//
// Computes y = a * b and registers it: y follows the operands by one clock,
// and a new product may start every clock. In the Gabor-type filter the four
// multipliers weight neighbour sums and differences by the filter coefficients.
//
// How it works: the 11-bit significands (hidden bit included) are multiplied
// into a 22-bit product, which lies in [1,4). If it is 2 or more the product is
// shifted right by one and the exponent raised. The top 11 bits are kept and
// rounded to nearest-even from the guard bit and the sticky OR of the rest.
//
// Number rules, as in fp16_add (this design's choices): subnormal operands count
// as zero, results whose rounded magnitude is below 2^-14 flush to a signed zero,
// overflow gives infinity, inf*0 or a NaN operand gives the quiet NaN 0x7E00.
module fp16_mul
  import fp16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  fp16_t res;

  always_comb begin
    logic              sgn;
    logic [21:0]       p;
    logic signed [6:0] e;
    logic [10:0]       mant;
    logic              g, st, up;
    logic [11:0]       mr;

    sgn = a[15] ^ b[15];
    p = '0; e = '0; mant = '0; g = 1'b0; st = 1'b0; up = 1'b0; mr = '0;

    if (fp16_is_nan(a[14:0]) || fp16_is_nan(b[14:0])) begin
      res = FP16_QNAN;
    end else if (fp16_is_inf(a[14:0]) || fp16_is_inf(b[14:0])) begin
      res = (fp16_is_zero(a[14:10]) || fp16_is_zero(b[14:10])) ? FP16_QNAN : {sgn, FP16_INF_MAG};
    end else if (fp16_is_zero(a[14:10]) || fp16_is_zero(b[14:10])) begin
      res = {sgn, 15'd0};
    end else begin
      p = {1'b1, a[9:0]} * {1'b1, b[9:0]};
      e = 7'(a[14:10]) + 7'(b[14:10]) - 7'(FP16_BIAS);
      if (p[21]) begin
        mant = p[21:11];
        g    = p[10];
        st   = |p[9:0];
        e    = e + 7'sd1;
      end else begin
        mant = p[20:10];
        g    = p[9];
        st   = |p[8:0];
      end
      up = g & (st | mant[0]);
      mr = {1'b0, mant} + 12'(up);
      if (mr[11]) begin
        mr = mr >> 1;
        e  = e + 7'sd1;
      end
      if (e >= 7'sd31)
        res = {sgn, FP16_INF_MAG};
      else if (e <= 7'sd0)
        res = {sgn, 15'd0};
      else
        res = {sgn, e[4:0], mr[9:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= FP16_ZERO;
    else        y <= res;
  end

endmodule
