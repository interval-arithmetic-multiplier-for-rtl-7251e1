// tb_fp_cmp: self-checking test of the binary64 min/max comparator.
//
// The expected ordering comes from the simulator's real comparison. Checks:
// lt matches a < b, min and max carry the smaller and larger value and are
// bit copies of the inputs, unordered and the NaN outputs appear exactly
// when an input is a NaN. Operands include equal values, both zeros,
// infinities, subnormals and random patterns of both signs.
module tb_fp_cmp;
  import ia_pkg::*;

  fp64_t a, b, mn, mx;
  logic  lt, unord;
  int    checks = 0, failures = 0;

  fp_cmp dut (.a, .b, .lt, .unordered(unord), .min(mn), .max(mx));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h lt=%b min=%h max=%h", what, a, b, lt, mn, mx);
    end
  endtask

  function automatic logic is_nan(fp64_t x);
    return x[62:52] == '1 && x[51:0] != '0;
  endfunction

  task automatic apply(fp64_t xa, fp64_t xb);
    real ra, rb;
    a = xa; b = xb;
    #1;
    ra = $bitstoreal(a); rb = $bitstoreal(b);
    if (is_nan(a) || is_nan(b)) begin
      check("nan", unord && !lt && is_nan(mn) && is_nan(mx));
      return;
    end
    check("unordered", !unord);
    check("lt", lt == (ra < rb));
    check("min value", $bitstoreal(mn) == ((ra < rb) ? ra : rb));
    check("max value", $bitstoreal(mx) == ((ra < rb) ? rb : ra));
    check("min/max are inputs", (mn == a && mx == b) || (mn == b && mx == a));
  endtask

  function automatic fp64_t rnd_fp();
    fp64_t r;
    r = {$urandom, $urandom};
    if ($urandom_range(3) == 0) r[62:52] = 11'(1020 + $urandom_range(6));
    return r;
  endfunction

  initial begin
    fp64_t x;
    apply(64'h0000000000000000, 64'h8000000000000000);
    apply(64'h8000000000000000, 64'h0000000000000000);
    apply(64'h3FF0000000000000, 64'hBFF0000000000000);
    apply(64'hBFF0000000000000, 64'hC000000000000000);
    apply(64'hFFF0000000000000, 64'h7FF0000000000000);
    apply(64'h0000000000000001, 64'h8000000000000001);
    apply(64'h7FF8000000000000, 64'h3FF0000000000000);
    apply(64'h3FF0000000000000, 64'hFFF0000000000001);
    repeat (5000) apply(rnd_fp(), rnd_fp());
    // same sign, close values
    repeat (2000) begin
      x = rnd_fp();
      apply(x, x ^ 64'($urandom_range(7)));
    end
    repeat (500) begin
      x = rnd_fp();
      apply(x, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
