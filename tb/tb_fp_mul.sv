// tb_fp_mul: self-checking test of the binary64 multiplier.
//
// The round-to-nearest output is compared with the simulator's own double
// multiplication. The directed outputs are checked against rules that hold
// for any correct implementation: prod_dn <= exact <= prod_up, both equal
// the nearest result when the product is exact, and otherwise they are
// adjacent doubles with the nearest one among them. Whether a product is
// exact is worked out here from the integer significand product. Operands
// mix random bit patterns, random exponents around the overflow and
// underflow limits, short significands (exact products), zeros, infinities
// and NaNs.
module tb_fp_mul;
  import ia_pkg::*;

  fp64_t a, b, dn, up, rn;
  logic  inexact;
  int    checks = 0, failures = 0;

  fp_mul dut (.a, .b, .prod_dn(dn), .prod_up(up), .prod_rn(rn), .inexact);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t next_up(fp64_t x);
    if (x[62:0] == '0)  return 64'h1;
    if (!x[63])         return x + 1;
    return x - 1;
  endfunction

  function automatic logic is_nan(fp64_t x);
    return x[62:52] == '1 && x[51:0] != '0;
  endfunction

  // exactness from the integer product, for normal operands whose product
  // is in the normal range
  function automatic logic exact_ref(fp64_t x, fp64_t y, output logic known);
    logic [105:0] p;
    int msb, lsb, e;
    p = {1'b1, x[51:0]} * {1'b1, y[51:0]};
    msb = 0; lsb = 105;
    for (int i = 0; i < 106; i++) if (p[i]) msb = i;
    for (int i = 105; i >= 0; i--) if (p[i]) lsb = i;
    e = int'(x[62:52]) + int'(y[62:52]) - 1023 + (msb - 104);
    known = x[62:52] != 0 && y[62:52] != 0 && x[62:52] != '1 && y[62:52] != '1
            && e >= 1 && e <= 2046;
    return (msb - lsb) <= 52;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h dn=%h up=%h rn=%h", what, a, b, dn, up, rn);
    end
  endtask

  task automatic apply(fp64_t xa, fp64_t xb);
    real   ref_r;
    fp64_t ref_b;
    logic  known, ex;
    a = xa; b = xb;
    #1;
    ref_r = $bitstoreal(a) * $bitstoreal(b);
    ref_b = $realtobits(ref_r);
    if (is_nan(ref_b)) begin
      check("nan", is_nan(rn) && is_nan(dn) && is_nan(up));
      return;
    end
    check("rn", rn == ref_b || (rn[62:0] == 0 && ref_b[62:0] == 0));
    check("order", $bitstoreal(dn) <= ref_r && ref_r <= $bitstoreal(up));
    if (!inexact)
      check("exact", dn == rn && up == rn);
    else
      check("adjacent", next_up(dn) == up && (rn == dn || rn == up));
    ex = exact_ref(a, b, known);
    if (known) check("inexact flag", inexact == !ex);
  endtask

  function automatic fp64_t rnd_fp(int emin, int emax);
    fp64_t r;
    r[63]    = 1'($urandom);
    r[62:52] = 11'(emin + int'($urandom_range(emax - emin)));
    r[51:0]  = {$urandom, $urandom};
    return r;
  endfunction

  initial begin
    // fixed cases
    apply(64'h3FF0000000000000, 64'h3FF0000000000000);   // 1*1
    apply(64'h3FF8000000000000, 64'hC004000000000000);   // 1.5*-2.5
    apply(64'h3FB999999999999A, 64'h3FB999999999999A);   // 0.1*0.1
    apply(64'hBFB999999999999A, 64'h3FB999999999999A);
    apply(64'h0000000000000001, 64'h3FE0000000000000);   // min subnormal / 2
    apply(64'h8000000000000001, 64'h3FE0000000000000);
    apply(64'h0000000000000003, 64'h3FE0000000000000);   // tie to even
    apply(64'h000FFFFFFFFFFFFF, 64'h4000000000000000);   // subnormal -> normal
    apply(64'h0010000000000000, 64'h3FEFFFFFFFFFFFFF);   // normal -> subnormal
    apply(64'h7FEFFFFFFFFFFFFF, 64'h4000000000000000);   // overflow
    apply(64'hFFEFFFFFFFFFFFFF, 64'h4000000000000000);
    apply(64'h7FEFFFFFFFFFFFFF, 64'h3FF0000000000001);
    apply(64'h0000000000000000, 64'hC000000000000000);   // zeros
    apply(64'h8000000000000000, 64'h7FF0000000000000);   // 0*inf
    apply(64'h7FF0000000000000, 64'hC000000000000000);   // inf
    apply(64'h7FF8000000000001, 64'h3FF0000000000000);   // NaN
    apply(64'h1000000000000000, 64'h1000000000000000);   // deep underflow
    apply(64'h2000000000000000, 64'h1FFFFFFFFFFFFFFF);
    // random mid-range
    repeat (4000) apply(rnd_fp(900, 1150), rnd_fp(900, 1150));
    // near the limits
    repeat (2000) apply(rnd_fp(1500, 2046), rnd_fp(1000, 1600));
    repeat (2000) apply(rnd_fp(0, 520), rnd_fp(300, 1100));
    // short significands: exact products
    repeat (1000) begin
      fp64_t x, y;
      x = rnd_fp(1000, 1040); y = rnd_fp(1000, 1040);
      x[25:0] = '0; y[26:0] = '0;
      apply(x, y);
      check("short exact", !inexact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
