// fp_cmp: 64-bit comparator for IEEE 754 binary64 numbers.
//
// Compares two doubles by sign and magnitude (the exponent/fraction field of
// a binary64 word orders like an unsigned integer) and returns the smaller
// and the larger of the two. Plus and minus zero compare equal; on equality
// min returns a and max returns b. If either input is a NaN the pair is
// unordered, lt is 0 and both min and max are the canonical quiet NaN, so a
// NaN end point propagates to the interval result.
//
// This is the "64 bit comparator" of the stage-2 datapath; the document gives
// its function only, the sign/magnitude structure and the NaN and tie rules
// are this design's choices. Purely combinational.
module fp_cmp
  import ia_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output logic  lt,         // a < b (ordered)
  output logic  unordered,  // a or b is NaN
  output fp64_t min,
  output fp64_t max
);

  logic mag_lt, mag_gt, both_zero, gt;

  always_comb begin
    unordered = fp_is_nan(a[62:0]) || fp_is_nan(b[62:0]);
    mag_lt    = a[62:0] < b[62:0];
    mag_gt    = a[62:0] > b[62:0];
    both_zero = (a[62:0] == '0) && (b[62:0] == '0);
    if (unordered || both_zero) begin
      lt = 1'b0;
      gt = 1'b0;
    end else if (a[63] != b[63]) begin
      lt = a[63];               // negative < positive
      gt = b[63];
    end else if (!a[63]) begin
      lt = mag_lt;              // both positive
      gt = mag_gt;
    end else begin
      lt = mag_gt;              // both negative: larger magnitude is smaller
      gt = mag_lt;
    end
    if (unordered) begin
      min = FP_QNAN;
      max = FP_QNAN;
    end else begin
      // on equality a is taken as min and b as max
      min = gt ? b : a;
      max = gt ? a : b;
    end
  end

endmodule
