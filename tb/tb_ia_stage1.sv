// tb_ia_stage1: self-checking test of the product stage.
//
// Random intervals go in; the registered p, q, r, t must equal the products
// xl*yl, xl*yu, xu*yl, xu*yu rounded down and up as computed by the
// reference package, or both equal to the nearest product for p and t in
// the floating-point mode. The handshake is checked too: loading takes one
// cycle, the registers and in_ready hold while stage 2 does not take them,
// and a take in the same cycle as a new load refills without a gap.
module tb_ia_stage1;
  import ia_pkg::*;
  import ia_ref_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      in_valid = 0, in_ready, take = 0, out_valid;
  op_e       op = OP_IMUL, op_q;
  interval_t x = '0, y = '0;
  prod_t     p, q, r, t;
  int        checks = 0, failures = 0;

  ia_stage1 dut (.clk, .rst_n, .in_valid, .in_ready, .op, .x, .y, .take,
                 .out_valid, .op_q, .p, .q, .r, .t);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%h,%h y=%h,%h", what, x.lo, x.hi, y.lo, y.hi);
    end
  endtask

  task automatic check_prods(op_e o, interval_t xx, interval_t yy);
    check("op", op_q == o);
    if (o == OP_FMUL) begin
      check("p rn", p.dn == mul_rn(xx.lo, yy.lo) && p.up == p.dn);
      check("t rn", t.dn == mul_rn(xx.hi, yy.hi) && t.up == t.dn);
    end else begin
      check("p", p.dn == mul_dn(xx.lo, yy.lo) && p.up == mul_up(xx.lo, yy.lo));
      check("t", t.dn == mul_dn(xx.hi, yy.hi) && t.up == mul_up(xx.hi, yy.hi));
    end
    check("q", q.dn == mul_dn(xx.lo, yy.hi) && q.up == mul_up(xx.lo, yy.hi));
    check("r", r.dn == mul_dn(xx.hi, yy.lo) && r.up == mul_up(xx.hi, yy.lo));
  endtask

  initial begin
    interval_t xs, ys;
    op_e       os;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check("empty after reset", !out_valid && in_ready);
    repeat (500) begin
      os = ($urandom_range(3) == 0) ? OP_FMUL : OP_IMUL;
      xs = '{lo: rnd_fp(990, 1056), hi: rnd_fp(990, 1056)};
      ys = '{lo: rnd_fp(990, 1056), hi: rnd_fp(990, 1056)};
      @(negedge clk);
      in_valid = 1; op = os; x = xs; y = ys; take = out_valid;
      @(posedge clk); #1;
      check("loaded", out_valid);
      @(negedge clk);
      in_valid = 1'b1; take = 0;
      x = '{lo: rnd_fp(990, 1056), hi: rnd_fp(990, 1056)};  // not accepted
      #1;
      check("not ready while full", !in_ready);
      @(posedge clk); #1;
      check_prods(os, xs, ys);
      in_valid = 0;
    end
    // take without a new load empties the registers
    @(negedge clk); take = 1;
    @(posedge clk); #1;
    check("emptied", !out_valid && in_ready);
    take = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
