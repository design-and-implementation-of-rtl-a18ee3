// fp16_add - registered binary16 floating-point adder/subtractor.
//
// Computes y = a + b (sub=0) or y = a - b (sub=1) and registers the result, so
// y follows the operands by one clock; a new operation may start every clock.
// This is one of the "registered adders" of the Gabor-type filter pipeline.
//
// How it works: the operand of larger magnitude is kept, the other one's
// significand is shifted right by the exponent difference into three extra
// bits (guard, round, sticky). The significands are added or subtracted, the
// sum is normalised (right by one on carry, left by the leading-zero count
// otherwise), rounded to nearest-even and packed.
//
// Number rules (the filter description says only "floating point"; these are
// this design's choices): subnormal operands count as zero, a result whose
// rounded magnitude is below 2^-14 becomes a zero of the result's sign, an
// exact cancellation gives +0, overflow gives infinity, and inf-inf or a NaN
// operand gives the quiet NaN 0x7E00.
module fp16_add
  import fp16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fp16_t a,
  input  fp16_t b,
  input  logic  sub,
  output fp16_t y
);

  fp16_t res;

  always_comb begin
    fp16_fields_t fa, fb, big, sml;
    logic         sb_eff;
    logic         eff_sub;
    logic [4:0]   d;
    logic [13:0]  mbig, msml;     // 1.f plus guard, round, sticky
    logic [13:0]  msh;
    logic         sticky;
    logic [14:0]  sum;
    logic signed [6:0] e;
    logic [13:0]  norm;
    int           lz;
    logic [10:0]  mant;
    logic         g, rs, up;
    logic [11:0]  mr;

    fa     = a;
    fb     = b;
    sb_eff = fb.sign ^ sub;
    res    = FP16_ZERO;

    big = '0; sml = '0; d = '0; mbig = '0; msml = '0; msh = '0; sticky = 1'b0;
    sum = '0; e = '0; norm = '0; lz = 0; mant = '0; g = 1'b0; rs = 1'b0;
    up = 1'b0; mr = '0; eff_sub = 1'b0;

    if (fp16_is_nan(a[14:0]) || fp16_is_nan(b[14:0])) begin
      res = FP16_QNAN;
    end else if (fp16_is_inf(a[14:0]) && fp16_is_inf(b[14:0])) begin
      res = (fa.sign == sb_eff) ? a : FP16_QNAN;
    end else if (fp16_is_inf(a[14:0])) begin
      res = a;
    end else if (fp16_is_inf(b[14:0])) begin
      res = {sb_eff, FP16_INF_MAG};
    end else if (fp16_is_zero(a[14:10]) && fp16_is_zero(b[14:10])) begin
      res = {fa.sign & sb_eff, 15'd0};
    end else if (fp16_is_zero(a[14:10])) begin
      res = {sb_eff, b[14:0]};
    end else if (fp16_is_zero(b[14:10])) begin
      res = a;
    end else begin
      // Order by magnitude; the larger operand sets the sign.
      if (a[14:0] >= b[14:0]) begin
        big = fa;
        sml = '{sign: sb_eff, exp: fb.exp, frac: fb.frac};
      end else begin
        big = '{sign: sb_eff, exp: fb.exp, frac: fb.frac};
        sml = fa;
      end
      eff_sub = big.sign ^ sml.sign;
      d       = big.exp - sml.exp;
      mbig    = {1'b1, big.frac, 3'b000};
      msml    = {1'b1, sml.frac, 3'b000};

      // Alignment shift with sticky collection.
      if (d >= 5'd14) begin
        msh    = 14'd0;
        sticky = 1'b1;
      end else begin
        msh    = msml >> d;
        sticky = 1'b0;
        for (int i = 0; i < 14; i++)
          if (i < int'(d) && msml[i]) sticky = 1'b1;
      end
      msh[0] = msh[0] | sticky;

      sum = eff_sub ? ({1'b0, mbig} - {1'b0, msh}) : ({1'b0, mbig} + {1'b0, msh});
      e   = 7'(big.exp);

      if (sum == 15'd0) begin
        res = FP16_ZERO;
      end else begin
        if (sum[14]) begin
          norm = {sum[14:2], sum[1] | sum[0]};
          e    = e + 7'sd1;
        end else begin
          lz = 0;
          for (int i = 13; i >= 0; i--) begin
            if (sum[i]) break;
            lz++;
          end
          norm = sum[13:0] << lz;
          e    = e - 7'(lz);
        end

        mant = norm[13:3];
        g    = norm[2];
        rs   = norm[1] | norm[0];
        up   = g & (rs | mant[0]);
        mr   = {1'b0, mant} + 12'(up);
        if (mr[11]) begin
          mr = mr >> 1;
          e  = e + 7'sd1;
        end

        if (e >= 7'sd31)
          res = {big.sign, FP16_INF_MAG};
        else if (e <= 7'sd0)
          res = {big.sign, 15'd0};
        else
          res = {big.sign, e[4:0], mr[9:0]};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= FP16_ZERO;
    else        y <= res;
  end

endmodule
