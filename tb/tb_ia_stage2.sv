// tb_ia_stage2: self-checking test of the min/max comparison stage.
//
// Random product sets (round-down and round-up words drawn independently,
// with repeated values, signed zeros, infinities and the odd NaN) are
// offered to stage 2. The expected Zl is the smallest round-down word and
// Zu the largest round-up word, found here with real comparisons. Also
// checked: the select lines step 00, 01, 10; take is high only in the last
// step; z_valid comes 3 cycles after the inputs appear (1 cycle in the
// floating-point mode, which copies p.dn and t.up); inputs presented back
// to back give one result every 3 cycles.
module tb_ia_stage2;
  import ia_pkg::*;
  import ia_ref_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      in_valid = 0, take, z_valid;
  op_e       op = OP_IMUL;
  prod_t     p = '0, q = '0, r = '0, t = '0;
  sel_e      sel;
  interval_t z;
  int        checks = 0, failures = 0;

  ia_stage2 dut (.clk, .rst_n, .in_valid, .op, .p, .q, .r, .t,
                 .take, .sel, .z, .z_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s p=%h/%h q=%h/%h r=%h/%h t=%h/%h z=%h,%h", what,
                 p.dn, p.up, q.dn, q.up, r.dn, r.up, t.dn, t.up, z.lo, z.hi);
    end
  endtask

  function automatic fp64_t pick();
    unique case ($urandom_range(15))
      0:       return 64'h0000_0000_0000_0000;
      1:       return 64'h8000_0000_0000_0000;
      2:       return 64'h7FF0_0000_0000_0000;
      3:       return 64'hFFF0_0000_0000_0000;
      4:       return ($urandom_range(7) == 0) ? 64'h7FF8_0000_0000_0000 : 64'h3FF0_0000_0000_0000;
      default: return rnd_fp(1015, 1030);
    endcase
  endfunction

  function automatic logic same_val(fp64_t a, fp64_t b);
    if (is_nan(a) || is_nan(b)) return is_nan(a) && is_nan(b);
    return $bitstoreal(a) == $bitstoreal(b);
  endfunction

  function automatic fp64_t ref_min(fp64_t a, fp64_t b, fp64_t c, fp64_t d);
    real m;
    if (is_nan(a) || is_nan(b) || is_nan(c) || is_nan(d)) return FP_QNAN;
    m = $bitstoreal(a);
    if ($bitstoreal(b) < m) m = $bitstoreal(b);
    if ($bitstoreal(c) < m) m = $bitstoreal(c);
    if ($bitstoreal(d) < m) m = $bitstoreal(d);
    return $realtobits(m);
  endfunction

  function automatic fp64_t ref_max(fp64_t a, fp64_t b, fp64_t c, fp64_t d);
    real m;
    if (is_nan(a) || is_nan(b) || is_nan(c) || is_nan(d)) return FP_QNAN;
    m = $bitstoreal(a);
    if ($bitstoreal(b) > m) m = $bitstoreal(b);
    if ($bitstoreal(c) > m) m = $bitstoreal(c);
    if ($bitstoreal(d) > m) m = $bitstoreal(d);
    return $realtobits(m);
  endfunction

  initial begin
    int    cyc, start, last_done;
    fp64_t e_lo, e_hi;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last_done = -1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op = ($urandom_range(4) == 0) ? OP_FMUL : OP_IMUL;
      p = '{dn: pick(), up: pick()};
      q = '{dn: pick(), up: pick()};
      r = '{dn: pick(), up: pick()};
      t = '{dn: pick(), up: pick()};
      if ($urandom_range(2) == 0) q.dn = p.dn;   // ties
      in_valid = 1;
      if (op == OP_FMUL) begin
        e_lo = p.dn; e_hi = t.up;
      end else begin
        e_lo = ref_min(p.dn, q.dn, r.dn, t.dn);
        e_hi = ref_max(p.up, q.up, r.up, t.up);
      end
      check("starts at 00", sel == SEL_PQ);
      cyc = 0;
      while (1) begin
        #1;
        if (op == OP_IMUL)
          check("select sequence", sel == sel_e'(cyc) && take == (cyc == 2));
        @(posedge clk); #1;
        cyc++;
        if (z_valid) break;
        if (cyc > 5) break;
        check("no early result", !z_valid);
      end
      check("latency", cyc == ((op == OP_FMUL) ? 1 : 3));
      check("Zl", same_val(z.lo, e_lo));
      check("Zu", same_val(z.hi, e_hi));
      // occasionally leave a gap; otherwise inputs stay back to back
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        in_valid = 0;
        @(posedge clk); #1;
        check("result holds", same_val(z.lo, e_lo) && same_val(z.hi, e_hi) && !z_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
