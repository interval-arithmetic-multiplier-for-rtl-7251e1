// ia_pkg: types and constants shared by the interval multiplier.
//
// Numbers are IEEE 754 binary64 (double precision) words, as the design
// multiplies 64-bit double precision operands throughout. An interval is a
// pair of such words, lower end point first. Each stage-1 product is carried
// as two words: the product rounded toward -infinity (used when searching for
// the lower end point) and rounded toward +infinity (used for the upper end
// point), which is how the design realises outward rounding.
package ia_pkg;

  localparam int unsigned FP_W    = 64;   // binary64 word
  localparam int unsigned EXP_W   = 11;
  localparam int unsigned FRAC_W  = 52;
  localparam int unsigned EXP_BIAS = 1023;

  typedef logic [FP_W-1:0] fp64_t;

  // Canonical quiet NaN returned for invalid operations.
  localparam fp64_t FP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam fp64_t FP_PINF = 64'h7FF0_0000_0000_0000;
  localparam fp64_t FP_MAXF = 64'h7FEF_FFFF_FFFF_FFFF;

  // Closed interval [lo, hi].
  typedef struct packed {
    fp64_t lo;
    fp64_t hi;
  } interval_t;

  // One stage-1 product with its two directed roundings.
  typedef struct packed {
    fp64_t dn;   // rounded toward -infinity
    fp64_t up;   // rounded toward +infinity
  } prod_t;

  // Operation of the unit.
  typedef enum logic [0:0] {
    OP_IMUL = 1'b0,   // interval multiply Z = X * Y
    OP_FMUL = 1'b1    // floating-point multiply, two lanes, round to nearest even
  } op_e;

  // Select-line state of stage 2 (s0, s1 in the multiplexer figure).
  typedef enum logic [1:0] {
    SEL_PQ = 2'b00,   // compare p and q  -> min1, max1
    SEL_R  = 2'b01,   // compare min1/max1 with r -> min2, max2
    SEL_T  = 2'b10    // compare min2/max2 with t -> Zl, Zu
  } sel_e;

  function automatic logic fp_is_nan(logic [62:0] a);
    return (a[62:52] == 11'h7FF) && (a[51:0] != '0);
  endfunction

endpackage
