// tb_ia_mul: end-to-end test of the interval multiplier at its default
// (and only) size.
//
// A driver offers random operations with random idle gaps and holds each
// one until it is accepted; a monitor checks every result against a
// reference computed here: Zl is the smallest of the four end-point products
// rounded down, Zu the largest rounded up (directed roundings from Dekker's
// error-free product), and in the floating-point mode the two nearest-even
// products. Each interval result is also checked to enclose the products of
// sample points taken inside X and Y.
//
// Counted mechanisms, each of which must occur: the nine sign cases of the
// end points (both intervals positive, negative or straddling zero, in all
// combinations); interval and floating-point operations; an operand held
// off because the unit was busy; stage 1 refilled in the cycle stage 2
// took its products (back-to-back issue); a result widened by outward
// rounding and one that is exact; a NaN end point propagating. Latency (4
// cycles interval, 2 cycles floating point from the accepting edge) and the
// issue interval of back-to-back interval operations (3 cycles) are checked.
module tb_ia_mul;
  import ia_pkg::*;
  import ia_ref_pkg::*;

  localparam int N_OPS = 4000;

  logic      clk = 0, rst_n = 0;
  logic      in_valid = 0, in_ready, z_valid;
  op_e       op = OP_IMUL;
  interval_t x = '0, y = '0, z;
  int        checks = 0, failures = 0;
  longint    cycle = 0;

  ia_mul dut (.clk, .rst_n, .in_valid, .in_ready, .op, .x, .y, .z, .z_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    op_e       o;
    interval_t xx, yy;
    interval_t e;
    longint    t_acc;
    logic      special;
  } item_t;

  item_t expq[$];
  int    n_case[9];
  int    n_fmul = 0, n_imul = 0, n_stall = 0, n_b2b = 0, n_wide = 0,
         n_exact = 0, n_nan = 0, n_done = 0;
  longint last_imul_acc = -100;

  initial begin : watchdog
    repeat (N_OPS * 12 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d z=%h,%h", what, cycle, z.lo, z.hi);
    end
  endtask

  function automatic real minr(real a, real b); return a < b ? a : b; endfunction
  function automatic real maxr(real a, real b); return a > b ? a : b; endfunction

  // interval of a sign class: 0 positive, 1 negative, 2 straddles zero
  function automatic interval_t rnd_iv(int cls);
    fp64_t a, b;
    unique case (cls)
      0: begin a = rnd_signed(0); b = rnd_signed(0); end
      1: begin a = rnd_signed(1); b = rnd_signed(1); end
      default: begin a = rnd_signed(1); b = rnd_signed(0); end
    endcase
    if ($bitstoreal(a) > $bitstoreal(b)) return '{lo: b, hi: a};
    if ($urandom_range(2) == 0) a[28:0] = '0;         // short significands
    if ($urandom_range(2) == 0) b[28:0] = '0;
    return '{lo: a, hi: b};
  endfunction

  function automatic int cls_of(interval_t v);
    if ($bitstoreal(v.lo) > 0.0) return 0;
    if ($bitstoreal(v.hi) < 0.0) return 1;
    return 2;
  endfunction

  function automatic interval_t ref_imul(interval_t a, interval_t b);
    fp64_t d[4], u[4];
    real lo, hi;
    d[0] = mul_dn(a.lo, b.lo); u[0] = mul_up(a.lo, b.lo);
    d[1] = mul_dn(a.lo, b.hi); u[1] = mul_up(a.lo, b.hi);
    d[2] = mul_dn(a.hi, b.lo); u[2] = mul_up(a.hi, b.lo);
    d[3] = mul_dn(a.hi, b.hi); u[3] = mul_up(a.hi, b.hi);
    lo = $bitstoreal(d[0]); hi = $bitstoreal(u[0]);
    for (int i = 1; i < 4; i++) begin
      lo = minr(lo, $bitstoreal(d[i]));
      hi = maxr(hi, $bitstoreal(u[i]));
    end
    return '{lo: $realtobits(lo), hi: $realtobits(hi)};
  endfunction

  // a point inside an interval
  function automatic real inside_pt(interval_t v);
    real f;
    f = real'($urandom_range(1000)) / 1000.0;
    return $bitstoreal(v.lo) + f * ($bitstoreal(v.hi) - $bitstoreal(v.lo));
  endfunction

  // ---------------- driver ----------------
  task automatic issue(item_t it);
    @(negedge clk);
    in_valid = 1; op = it.o; x = it.xx; y = it.yy;
    while (1) begin
      #1;
      if (in_ready) break;
      n_stall++;
      @(negedge clk);
    end
    @(posedge clk);
    it.t_acc = cycle;
    if (expq.size() > 0) n_b2b++;   // stage 1 still held the previous operation
    if (it.o == OP_IMUL) begin
      if (cycle - last_imul_acc < 3) check("issue interval", 0);
      last_imul_acc = cycle;
    end
    expq.push_back(it);
    #1;
    in_valid = 0;
  endtask

  initial begin
    item_t it;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // NaN propagation: 0 * inf
    it.o = OP_IMUL; it.special = 1;
    it.xx = '{lo: 64'h0, hi: 64'h3FF0_0000_0000_0000};
    it.yy = '{lo: 64'hFFF0_0000_0000_0000, hi: 64'h4000_0000_0000_0000};
    it.e  = '{lo: FP_QNAN, hi: FP_QNAN};
    issue(it);
    // exact interval product: [1, 2] * [-3, 0.5] = [-6, 1]
    it.special = 0;
    it.xx = '{lo: 64'h3FF0_0000_0000_0000, hi: 64'h4000_0000_0000_0000};
    it.yy = '{lo: 64'hC008_0000_0000_0000, hi: 64'h3FE0_0000_0000_0000};
    it.e  = ref_imul(it.xx, it.yy);
    check("hand-worked reference", it.e.lo == 64'hC018_0000_0000_0000 && it.e.hi == 64'h3FF0_0000_0000_0000);
    issue(it);
    for (int n = 0; n < N_OPS; n++) begin
      it.special = 0;
      it.o  = ($urandom_range(5) == 0) ? OP_FMUL : OP_IMUL;
      it.xx = rnd_iv($urandom_range(2));
      it.yy = rnd_iv($urandom_range(2));
      if (it.o == OP_FMUL)
        it.e = '{lo: mul_rn(it.xx.lo, it.yy.lo), hi: mul_rn(it.xx.hi, it.yy.hi)};
      else
        it.e = ref_imul(it.xx, it.yy);
      issue(it);
      if ($urandom_range(7) == 0) repeat ($urandom_range(4)) @(posedge clk);
    end
  end

  // ---------------- monitor ----------------
  initial begin
    item_t it;
    real   px, py, pr;
    @(posedge rst_n);
    while (n_done < N_OPS + 2) begin
      @(posedge clk); #2;
      if (!z_valid) continue;
      if (expq.size() == 0) begin
        check("result without operation", 0);
        continue;
      end
      it = expq.pop_front();
      n_done++;
      check("latency", cycle - it.t_acc == ((it.o == OP_FMUL) ? 2 : 4));
      if (it.special) begin
        check("NaN propagates", is_nan(z.lo) && is_nan(z.hi));
        if (is_nan(z.lo)) n_nan++;
        continue;
      end
      check("Zl", $bitstoreal(z.lo) == $bitstoreal(it.e.lo));
      check("Zu", $bitstoreal(z.hi) == $bitstoreal(it.e.hi));
      if (it.o == OP_FMUL) begin
        n_fmul++;
        continue;
      end
      n_imul++;
      n_case[cls_of(it.xx) * 3 + cls_of(it.yy)]++;
      check("ordered", $bitstoreal(z.lo) <= $bitstoreal(z.hi));
      repeat (4) begin
        px = inside_pt(it.xx); py = inside_pt(it.yy); pr = px * py;
        check("encloses sample product", $bitstoreal(z.lo) <= pr && pr <= $bitstoreal(z.hi));
      end
      if (mul_dn(it.xx.lo, it.yy.lo) != mul_up(it.xx.lo, it.yy.lo) ||
          mul_dn(it.xx.hi, it.yy.hi) != mul_up(it.xx.hi, it.yy.hi)) n_wide++;
      if (mul_dn(it.xx.lo, it.yy.lo) == mul_up(it.xx.lo, it.yy.lo) &&
          mul_dn(it.xx.lo, it.yy.hi) == mul_up(it.xx.lo, it.yy.hi) &&
          mul_dn(it.xx.hi, it.yy.lo) == mul_up(it.xx.hi, it.yy.lo) &&
          mul_dn(it.xx.hi, it.yy.hi) == mul_up(it.xx.hi, it.yy.hi)) n_exact++;
    end
    for (int i = 0; i < 9; i++) begin
      $display("sign case X%0d Y%0d: %0d", i / 3, i % 3, n_case[i]);
      check("sign case exercised", n_case[i] > 0);
    end
    $display("interval ops %0d, fp ops %0d, stall cycles %0d, back-to-back issues %0d",
             n_imul, n_fmul, n_stall, n_b2b);
    $display("widened by rounding %0d, exact %0d, NaN results %0d", n_wide, n_exact, n_nan);
    check("interval ops", n_imul > 0);
    check("fp ops", n_fmul > 0);
    check("stall", n_stall > 0);
    check("back-to-back", n_b2b > 0);
    check("outward rounding", n_wide > 0);
    check("exact result", n_exact > 0);
    check("NaN", n_nan > 0);
    check("queue drained", expq.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
