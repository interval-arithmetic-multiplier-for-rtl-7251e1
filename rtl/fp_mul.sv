// fp_mul: IEEE 754 binary64 multiplier with three roundings of one product.
//
// The significands (with hidden bit, subnormals taken as 0.f * 2^-1022) are
// multiplied exactly into a 106-bit product, which is normalised with a
// leading-zero count, denormalised again when the result falls below the
// normal range, and then rounded three ways from the same guard and sticky
// bits: toward -infinity (prod_dn), toward +infinity (prod_up) and to nearest
// even (prod_rn). Keeping the product exact until the final rounding is what
// lets the interval unit round the lower end point down and the upper end
// point up with no change of a global rounding mode.
//
// Special operands follow IEEE 754: NaN in, or zero times infinity, gives the
// canonical quiet NaN; infinity times a non-zero number gives a signed
// infinity; an overflow gives infinity or the largest finite number according
// to the rounding direction. Exceptions are not flagged apart from inexact.
//
// Timing: purely combinational; the caller registers the result.
// The double-precision format and the two directed roundings come from the
// interval multiplier's description; the structure of the multiplier itself
// (array product, normalise, round) is this design's own, as the multiplier
// is only specified by its function.
module fp_mul
  import ia_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t prod_dn,   // rounded toward -infinity
  output fp64_t prod_up,   // rounded toward +infinity
  output fp64_t prod_rn,   // rounded to nearest, ties to even
  output logic  inexact    // product not representable exactly
);

  typedef enum logic [1:0] {RM_RN, RM_DN, RM_UP} rmode_e;

  logic               sa, sb, sr;
  logic [EXP_W-1:0]   ea, eb;
  logic [FRAC_W-1:0]  fa, fb;
  logic               a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [52:0]        ma, mb;
  logic [105:0]       prod, prod_n, prod_s, lost_mask;
  logic [6:0]         lzc;
  logic signed [13:0] e_res;
  logic [7:0]         sh;
  logic [51:0]        m52;  // stored fraction before rounding
  logic               g, s, lost, ovf_pre;
  logic [EXP_W-1:0]   e_field;
  logic [62:0]        base;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sr     = sa ^ sb;
    a_zero = (ea == '0) && (fa == '0);
    b_zero = (eb == '0) && (fb == '0);
    a_inf  = (ea == '1) && (fa == '0);
    b_inf  = (eb == '1) && (fb == '0);
    a_nan  = (ea == '1) && (fa != '0);
    b_nan  = (eb == '1) && (fb != '0);
    // hidden bit; a subnormal uses exponent 1 with a zero hidden bit
    ma = {(ea != '0), fa};
    mb = {(eb != '0), fb};
  end

  // exact significand product
  assign prod = ma * mb;

  // leading-zero count of the product
  always_comb begin
    lzc = 7'd106;
    for (int i = 0; i < 106; i++)
      if (prod[i]) lzc = 7'(105 - i);
  end

  always_comb begin
    prod_n = prod << lzc;
    // biased exponent of the normalised product 1.f:
    // value = prod * 2^(ea+eb-2046-104), so E = ea + eb - 1022 - lzc
    e_res = 14'(ea == '0 ? 1 : ea) + 14'(eb == '0 ? 1 : eb) - 14'(EXP_BIAS - 1)
          - 14'(lzc);
    ovf_pre = (e_res > 14'sd2046);
    if (e_res < 14'sd1) begin
      // below the normal range: shift right into the subnormal position
      sh      = (e_res < -14'sd120) ? 8'd121 : 8'(14'sd1 - e_res);
      e_field = '0;
    end else begin
      sh      = '0;
      e_field = e_res[EXP_W-1:0];
    end
    lost_mask = ~({106{1'b1}} << sh);
    lost      = |(prod_n & lost_mask);
    prod_s    = prod_n >> sh;
    m52       = prod_s[104:53];   // bit 105 is the hidden bit
    g         = prod_s[52];
    s         = (|prod_s[51:0]) | lost;
    base      = {e_field, m52};
  end

  // round the common intermediate result in one direction
  function automatic fp64_t round_to(rmode_e rm);
    logic   away, inc;
    logic [62:0] sum;   // a carry out of the fraction lands in the exponent
    fp64_t  res;
    // rounding magnitude away from zero is "up" for positive, "down" for negative
    away = (rm == RM_UP && !sr) || (rm == RM_DN && sr);
    case (rm)
      RM_RN:   inc = g & (s | m52[0]);
      default: inc = away & (g | s);
    endcase
    sum = base + 63'(inc);
    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf))
      res = FP_QNAN;
    else if (a_inf || b_inf)
      res = {sr, FP_PINF[62:0]};
    else if (a_zero || b_zero)
      res = {sr, 63'd0};
    else if (ovf_pre || sum[62:52] == '1)
      res = (rm == RM_RN || away) ? {sr, FP_PINF[62:0]} : {sr, FP_MAXF[62:0]};
    else
      res = {sr, sum[62:0]};
    return res;
  endfunction

  assign prod_dn = round_to(RM_DN);
  assign prod_up = round_to(RM_UP);
  assign prod_rn = round_to(RM_RN);
  assign inexact = (g | s | ovf_pre) && !(a_nan || b_nan || a_inf || b_inf || a_zero || b_zero);

endmodule
