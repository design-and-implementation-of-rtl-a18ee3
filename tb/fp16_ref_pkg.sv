// fp16_ref_pkg - reference arithmetic for the testbenches.
//
// Converts binary16 words to and from SystemVerilog 'real' (IEEE double). The
// sum or product of two binary16 numbers is exact in double precision, so an
// operation computed in 'real' and converted back with to_fp16() gives the
// correctly rounded binary16 result. to_fp16() rounds to nearest-even and
// applies the same number rules as the datapath: results below 2^-14 flush to a
// signed zero, overflow gives infinity. It works on the double's bit fields and
// shares no code with the RTL.
package fp16_ref_pkg;

  function automatic real to_real(logic [15:0] h);
    int  e;
    real m;
    e = int'(h[14:10]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(h[9:0]) / 1024.0;
    m = m * (2.0 ** (e - 15));
    return h[15] ? -m : m;
  endfunction

  function automatic logic [15:0] to_fp16(real r);
    logic [63:0] bits;
    logic        sgn;
    int          e;
    logic [10:0] kept;    // hidden bit + 10 fraction bits
    logic        g, rest;
    bits = $realtobits(r);
    sgn  = bits[63];
    if (bits[62:0] == 63'd0) return {sgn, 15'd0};
    e    = int'(bits[62:52]) - 1023 + 15;
    kept = {1'b1, bits[51:42]};
    g    = bits[41];
    rest = |bits[40:0];
    if (g && (rest || kept[0])) begin
      if (kept == 11'h7FF) begin
        kept = 11'h400;
        e    = e + 1;
      end else begin
        kept = kept + 11'd1;
      end
    end
    if (e >= 31) return {sgn, 15'h7C00};
    if (e <= 0)  return {sgn, 15'd0};
    return {sgn, 5'(e), kept[9:0]};
  endfunction

  function automatic logic [15:0] ref_add(logic [15:0] a, logic [15:0] b);
    real s;
    s = to_real(a) + to_real(b);
    if (s == 0.0) return (a[15] && b[15] && a[14:10] == 0 && b[14:10] == 0) ? 16'h8000 : 16'h0000;
    return to_fp16(s);
  endfunction

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    return to_fp16(to_real(a) * to_real(b));
  endfunction

  // Two words are equal if identical or both zeros of either sign.
  function automatic logic same(logic [15:0] x, logic [15:0] y);
    return (x == y) || (x[14:0] == 15'd0 && y[14:0] == 15'd0);
  endfunction

  // Random finite normal binary16 value with exponent in [emin, emax].
  function automatic logic [15:0] rand_fp16(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 5'(e), 10'($urandom)};
  endfunction

  // One GTF tree evaluation in the datapath's order of operations:
  // s=0 real part, s=1 imaginary part. yr/yi are indexed W, E, N, S and coef is
  // {by, bx, ay, ax} from index 3 down to 0.
  function automatic logic [15:0] ref_gtf(logic s, logic [3:0][15:0] yr,
                                          logic [3:0][15:0] yi, logic [15:0] bu,
                                          logic [3:0][15:0] coef);
    logic [15:0] s1, s2, d1, d2, c0, neg;
    if (!s) begin
      s1 = ref_add(yr[0], yr[1]);
      s2 = ref_add(yr[2], yr[3]);
      d1 = ref_add(yi[1], {~yi[0][15], yi[0][14:0]});   // IE - IW
      d2 = ref_add(yi[3], {~yi[2][15], yi[2][14:0]});   // IS - IN
      c0 = bu;
    end else begin
      s1 = ref_add(yi[0], yi[1]);
      s2 = ref_add(yi[2], yi[3]);
      d1 = ref_add(yr[0], {~yr[1][15], yr[1][14:0]});   // RW - RE
      d2 = ref_add(yr[2], {~yr[3][15], yr[3][14:0]});   // RN - RS
      c0 = 16'h0000;
    end
    neg = ref_add(ref_add(ref_mul(coef[0], s1), ref_mul(coef[2], s2)),
                  ref_add(ref_mul(coef[1], d1), ref_mul(coef[3], d2)));
    return ref_add(neg, c0);
  endfunction

endpackage
